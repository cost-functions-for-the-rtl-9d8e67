// tb_crc_fu: self-checking test of the functional unit at D = 32.
// Every operation is exercised with directed corner cases (carry/borrow,
// shift by positive, negative and oversize amounts, equal and unequal
// compares) and with random operands, against the reference FU of
// crc_tb_pkg. The FU is combinational: results are checked 1 ns after the
// inputs change.
module tb_crc_fu;
  import crc_pkg::*;
  import crc_tb_pkg::fu_ref;

  localparam int D = 32;
  int checks = 0, failures = 0;

  fu_op_e       op;
  logic [D-1:0] a, b, y, ey;
  logic         sa, sb, sy, esy;

  crc_fu #(.D(D)) dut (.op, .a, .b, .sa, .sb, .y, .sy);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int o, logic [D-1:0] ia, logic [D-1:0] ib, logic isa, logic isb);
    op = fu_op_e'(o); a = ia; b = ib; sa = isa; sb = isb;
    #1;
    fu_ref(o, ia, ib, isa, isb, ey, esy);
    checks++;
    if (y !== ey || sy !== esy) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%0d a=%h b=%h sa=%b sb=%b: y=%h sy=%b expected %h %b",
                 o, ia, ib, isa, isb, y, sy, ey, esy);
    end
  endtask

  initial begin
    // Directed values computed by hand
    apply(2, 32'hFFFF_FFFF, 32'h1, 0, 0);
    if (y !== 32'h0 || sy !== 1'b1) begin failures++; $display("FAIL +co carry"); end
    apply(3, 32'h5, 32'h7, 0, 0);
    if (y !== 32'hFFFF_FFFE || sy !== 1'b1) begin failures++; $display("FAIL -co borrow"); end
    apply(6, 32'h1, 32'd4, 0, 0);
    if (y !== 32'h10) begin failures++; $display("FAIL shift left"); end
    apply(6, 32'h100, -32'sd4, 0, 0);
    if (y !== 32'h10) begin failures++; $display("FAIL shift right"); end
    apply(1, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 0, 0);
    if (y !== 32'hFFFF_FFFE) begin failures++; $display("FAIL *h"); end
    apply(0, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 0, 0);
    if (y !== 32'h1) begin failures++; $display("FAIL *l"); end
    apply(21, 32'hA, 32'hB, 1, 0);
    if (y !== 32'hA) begin failures++; $display("FAIL sel"); end
    checks += 7;
    // Corner cases for every op
    for (int o = 0; o < 24; o++) begin
      apply(o, 32'h0, 32'h0, 0, 0);
      apply(o, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 1, 1);
      apply(o, 32'h1234_5678, 32'h1234_5678, 1, 0);
      apply(o, 32'h8000_0000, 32'h7FFF_FFFF, 0, 1);
      apply(o, 32'hDEAD_BEEF, 32'd31, 1, 1);
      apply(o, 32'hDEAD_BEEF, 32'd32, 0, 1);
      apply(o, 32'hDEAD_BEEF, -32'sd31, 1, 0);
      apply(o, 32'hDEAD_BEEF, -32'sd32, 1, 0);
    end
    // Random
    for (int i = 0; i < 20000; i++) begin
      logic [D-1:0] ra, rb;
      ra = $urandom;
      rb = ($urandom_range(0, 3) == 0) ? D'($signed($urandom_range(0, 80)) - 40) : $urandom;
      apply($urandom_range(0, 23), ra, rb, 1'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
