// tb_delay_ram: checks the tap delay line at its default size (53 x 4 bits).
// Random samples are shifted in with a random enable; after every clock all
// taps are compared with a queue model. Reset must clear every tap.
module tb_delay_ram;
  localparam int W = 4, DEPTH = 53;
  logic clk = 0, reset = 1, en = 0;
  logic [W-1:0] din = '0;
  logic [W-1:0] taps [DEPTH];
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, cycles = 0;

  delay_ram #(.W(W), .DEPTH(DEPTH)) dut (.clk(clk), .reset(reset), .en(en), .din(din), .taps(taps));

  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    for (int k = 0; k < DEPTH; k++) begin
      if (taps[k] !== model[k]) begin
        failures++;
        $display("FAIL cycle %0d tap %0d = %h expected %h", cycles, k, taps[k], model[k]);
        break;
      end
    end
  endtask

  initial begin
    repeat (DEPTH) model.push_back('0);
    @(posedge clk); #1;
    compare();
    reset = 0;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      if (c == 400) reset = 1;
      else begin
        reset = 0;
        en  = 1'($urandom_range(0, 3) != 0);
        din = W'($urandom);
      end
      @(posedge clk); #1;
      cycles++;
      if (reset) begin
        model.delete();
        repeat (DEPTH) model.push_back('0);
      end else if (en) begin
        model.push_front(din);
        void'(model.pop_back());
      end
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
