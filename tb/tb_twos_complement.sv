// tb_twos_complement: checks the conditional negation at the width the adder
// uses (33 bits) against integer negation, for edge values and random words,
// with neg both low (word must pass unchanged) and high.
module tb_twos_complement;
  logic [32:0] x, y;
  logic        neg;
  int checks = 0, failures = 0;

  twos_complement #(.W(33)) dut (.x(x), .neg(neg), .y(y));

  task automatic check_one(logic [32:0] v, logic n);
    logic [32:0] e = n ? 33'(-longint'(v)) : v;
    x = v; neg = n;
    #1;
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL x=%h neg=%b y=%h expected %h", v, n, y, e);
    end
  endtask

  initial begin
    logic [32:0] edges [5] = '{33'h0, 33'h1, 33'h0_7fff_ffff, 33'h1_0000_0000, 33'h1_ffff_ffff};
    foreach (edges[i]) begin
      check_one(edges[i], 1'b0);
      check_one(edges[i], 1'b1);
    end
    repeat (2000) check_one({1'($urandom), 32'($urandom)}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
