// tb_nibble_multiplier: checks the shift-and-add sign-magnitude multiplier.
// Every 4-bit sample value is multiplied by edge-case coefficients (zero,
// one, largest magnitude, both signs) and by random coefficients; the product
// is compared with an integer multiplication, including the rule that a zero
// product is a positive zero.
module tb_nibble_multiplier;
  logic [3:0]  a;
  logic [27:0] b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  nibble_multiplier #(.A_W(4), .B_W(28), .P_W(32)) dut (.a(a), .b(b), .p(p));

  function automatic logic [31:0] expect_p(logic [3:0] x, logic [27:0] c);
    longint mag = longint'(x[2:0]) * longint'(c[26:0]);
    logic   s   = (x[3] ^ c[27]) && (mag != 0);
    return {s, mag[30:0]};
  endfunction

  task automatic check_one(logic [3:0] x, logic [27:0] c);
    a = x; b = c;
    #1;
    checks++;
    if (p !== expect_p(x, c)) begin
      failures++;
      $display("FAIL a=%h b=%h p=%h expected %h", x, c, p, expect_p(x, c));
    end
  endtask

  initial begin
    logic [27:0] edge_c [6] = '{28'h0, 28'h1, 28'h7ff_ffff, 28'h800_0000, 28'h800_0001, 28'hfff_ffff};
    for (int x = 0; x < 16; x++) begin
      foreach (edge_c[i]) check_one(4'(x), edge_c[i]);
      repeat (200) check_one(4'(x), 28'($urandom));
    end
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
