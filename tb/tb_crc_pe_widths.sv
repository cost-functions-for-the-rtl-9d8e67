// tb_crc_pe_widths: runs the same eight-state PE program at data-path widths
// of 8, 16 and 32 bits (the widths the architecture was evaluated at, with
// 12 registers and 16 contexts each). Each width is checked by
// crc_pe_width_check against values computed from its inputs: multiply low
// and high halves, add with carry and the branch on the carry, signed-amount
// shift and an unsigned compare. Both branch directions must occur at every
// width.
module tb_crc_pe_widths;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done8, done16, done32;
  int c8, c16, c32, f8, f16, f32, cy8, cy16, cy32, nc8, nc16, nc32;

  crc_pe_width_check #(.D(8))  w8  (.clk, .done(done8),  .checks(c8),  .failures(f8),
                                    .carries(cy8),  .no_carries(nc8));
  crc_pe_width_check #(.D(16)) w16 (.clk, .done(done16), .checks(c16), .failures(f16),
                                    .carries(cy16), .no_carries(nc16));
  crc_pe_width_check #(.D(32)) w32 (.clk, .done(done32), .checks(c32), .failures(f32),
                                    .carries(cy32), .no_carries(nc32));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32, f8 + f16 + f32 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    wait (done8 && done16 && done32);
    checks = c8 + c16 + c32 + 6;
    failures = f8 + f16 + f32;
    if (cy8 == 0 || nc8 == 0) failures++;
    if (cy16 == 0 || nc16 == 0) failures++;
    if (cy32 == 0 || nc32 == 0) failures++;
    if (c8 == 0 || c16 == 0 || c32 == 0) failures += 3;
    $display("carry / no-carry runs: D=8 %0d/%0d, D=16 %0d/%0d, D=32 %0d/%0d",
             cy8, nc8, cy16, nc16, cy32, nc32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
