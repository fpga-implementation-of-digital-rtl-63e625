// tb_byte_adder: checks the sign-magnitude adder against integer addition.
// Covers all sign combinations, results that change sign (where the
// negative sum is turned back into a magnitude), zero results (must be
// positive zero) and sums too large for the magnitude (ovf and saturation).
module tb_byte_adder;
  logic [31:0] a, b, s;
  logic        ovf;
  int checks = 0, failures = 0;
  int n_neg = 0, n_ovf = 0;

  byte_adder #(.W(32)) dut (.a(a), .b(b), .s(s), .ovf(ovf));

  function automatic longint val(logic [31:0] w);
    return w[31] ? -longint'(w[30:0]) : longint'(w[30:0]);
  endfunction

  task automatic check_one(logic [31:0] x, logic [31:0] y);
    longint r   = val(x) + val(y);
    longint m   = (r < 0) ? -r : r;
    logic   eo  = (m > 64'h7fff_ffff);
    logic [31:0] es = eo ? {logic'(r < 0), 31'h7fff_ffff} : {logic'(r < 0), m[30:0]};
    a = x; b = y;
    #1;
    checks++;
    if (r < 0) n_neg++;
    if (eo) n_ovf++;
    if (s !== es || ovf !== eo) begin
      failures++;
      $display("FAIL a=%h b=%h s=%h ovf=%b expected %h %b", x, y, s, ovf, es, eo);
    end
  endtask

  initial begin
    check_one(32'h0000_0005, 32'h8000_0005);   // +5 + -5 = +0
    check_one(32'h8000_0000, 32'h8000_0000);   // -0 + -0 = +0
    check_one(32'h0000_0003, 32'h8000_0007);   // 3 - 7 = -4
    check_one(32'h8000_0009, 32'h0000_0002);   // -9 + 2 = -7
    check_one(32'h8000_0009, 32'h8000_0002);   // -11
    check_one(32'h7fff_ffff, 32'h0000_0001);   // overflow
    check_one(32'hffff_ffff, 32'h8000_0001);   // negative overflow
    check_one(32'h7fff_fffe, 32'h0000_0001);   // largest magnitude
    repeat (3000) check_one($urandom, $urandom);
    repeat (3000) check_one({1'($urandom), 11'd0, 20'($urandom)}, {1'($urandom), 11'd0, 20'($urandom)});
    if (n_neg == 0 || n_ovf == 0) failures++;
    $display("negative results %0d, overflows %0d", n_neg, n_ovf);
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
