// tb_ih_line_buffer -- the one-line IH memory against an array model.
//
// Random writes and two random reads per cycle, with en dropped now and then:
// read data must appear one enabled cycle after the address and hold while en
// is low; a write takes effect only when en is high.
module tb_ih_line_buffer;
  localparam int unsigned DEPTH = 90, DW = 96;

  logic clk = 1'b0, en, we;
  logic [6:0] ra0, ra1, wa;
  logic [DW-1:0] rd0, rd1, wd;
  logic [DW-1:0] model [DEPTH];
  logic [DW-1:0] exp0, exp1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ih_line_buffer #(.DEPTH(DEPTH), .DW(DW)) dut (.clk, .en, .ra0, .rd0, .ra1, .rd1, .we, .wa, .wd);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1; we = 1'b1;
    // fill
    for (int a = 0; a < int'(DEPTH); a++) begin
      wa = 7'(a); wd = {$urandom, $urandom, $urandom};
      ra0 = '0; ra1 = '0;
      model[a] = wd;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2000; n++) begin
      en  = ($urandom % 4) != 0;
      we  = ($urandom % 2) != 0;
      wa  = 7'($urandom % DEPTH);
      wd  = {$urandom, $urandom, $urandom};
      ra0 = 7'($urandom % DEPTH);
      ra1 = 7'($urandom % DEPTH);
      // avoid reading the entry written in the same cycle
      if (ra0 == wa) ra0 = 7'((wa + 1) % DEPTH);
      if (ra1 == wa) ra1 = 7'((wa + 2) % DEPTH);
      if (en) begin
        exp0 = model[ra0];
        exp1 = model[ra1];
        if (we) model[wa] = wd;
      end
      @(posedge clk); #1;
      checks += 2;
      if (rd0 !== exp0) begin failures++; if (failures < 10) $display("rd0 mismatch at %0d", n); end
      if (rd1 !== exp1) begin failures++; if (failures < 10) $display("rd1 mismatch at %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
