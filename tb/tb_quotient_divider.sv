// tb_quotient_divider -- rounded, saturating 8-bit division.
//
// Random numerator / denominator pairs where the quotient fits (as in the
// filter, numerator up to 255 x denominator), pairs that overflow, a zero
// denominator and exact halves, compared with round-half-up integer division.
module tb_quotient_divider;
  import jbf_ref_pkg::*;
  localparam int unsigned NU_W = 36, DE_W = 28;

  logic [NU_W-1:0] nu;
  logic [DE_W-1:0] de;
  logic [7:0] q;
  int checks = 0, failures = 0;

  quotient_divider #(.NU_W(NU_W), .DE_W(DE_W), .Q_W(8)) dut (.nu, .de, .q);

  task automatic check(longint unsigned n, longint unsigned d);
    int unsigned e;
    nu = NU_W'(n);
    de = DE_W'(d);
    #1;
    e = div_round(n, d);
    checks++;
    if (q !== 8'(e)) begin
      failures++;
      if (failures < 10) $display("%0d / %0d: got %0d expected %0d", n, d, q, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(1000, 0);
    check(5, 10);       // exactly one half rounds up
    check(4, 10);
    check(255 * 7, 7);
    check(256 * 7, 7);  // saturates
    for (int n = 0; n < 3000; n++) begin
      longint unsigned d, x;
      d = 64'($urandom % (1 << 20)) + 1;
      x = {$urandom, $urandom} % (d * 256);
      check(x, d);
    end
    for (int n = 0; n < 200; n++) check(64'({$urandom, $urandom}) % (64'd1 << 36), 64'($urandom % 1000) + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
