// tb_mp_dot32: checks the packed dot product against an independent
// field-by-field reference for all precision codes, on random words and on
// the extreme values of each field width.
module tb_mp_dot32;
  import mp_pkg::*;
  import tb_ref_pkg::*;

  logic [1:0]         prec;
  logic [31:0]        a, b;
  logic signed [17:0] dot;
  int checks = 0, failures = 0;

  mp_dot32 dut (.prec(prec_e'(prec)), .a(a), .b(b), .dot(dot));

  task automatic check(int p, bit [31:0] x, bit [31:0] y);
    int exp;
    prec = 2'(p);
    a = x;
    b = y;
    #1;
    exp = ref_dot(p, x, y);
    checks++;
    if (int'(dot) != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL prec=%0d a=%h b=%h dot=%0d exp=%0d", p, x, y, dot, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // extremes: most negative times most negative, most positive, mixed
    for (int p = 0; p < 4; p++) begin
      check(p, 32'h8080_8080, 32'h8080_8080);
      check(p, 32'h7F7F_7F7F, 32'h8080_8080);
      check(p, 32'h8888_8888, 32'h8888_8888);
      check(p, 32'hAAAA_AAAA, 32'hAAAA_AAAA);
      check(p, 32'hFFFF_FFFF, 32'h5555_5555);
      check(p, 32'h0000_0001, 32'hFFFF_FFFF);
      check(p, 32'h0000_0000, 32'h1234_5678);
    end
    for (int n = 0; n < 4000; n++) check(n % 4, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
