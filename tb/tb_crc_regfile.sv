// tb_crc_regfile: register set test at the default size (32-bit, 12
// registers) and as a status register set (1-bit). Random writes are
// mirrored in a shadow array; after every clock all outputs are compared.
// Also checks that reset clears everything and that we = 0 writes nothing.
module tb_crc_regfile;
  localparam int W = 32, NREGS = 12;
  int checks = 0, failures = 0;

  logic clk = 0, rst;
  logic we, swe;
  logic [3:0] waddr, swaddr;
  logic [W-1:0] wdata;
  logic swdata;
  logic [NREGS-1:0][W-1:0] q, shadow;
  logic [NREGS-1:0] sq, sshadow;

  crc_regfile #(.W(W), .NREGS(NREGS)) dut (.clk, .rst, .we, .waddr, .wdata, .q);
  crc_regfile #(.W(1), .NREGS(NREGS)) dut_s (.clk, .rst, .we(swe), .waddr(swaddr),
                                             .wdata(swdata), .q(sq));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; swe = 0; waddr = 0; swaddr = 0; wdata = 0; swdata = 0;
    @(posedge clk); #1;
    rst = 0;
    shadow = '0; sshadow = '0;
    checks++;
    if (q !== '0 || sq !== '0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); waddr = 4'($urandom_range(0, NREGS - 1)); wdata = $urandom;
      swe = 1'($urandom); swaddr = 4'($urandom_range(0, NREGS - 1)); swdata = 1'($urandom);
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      if (swe) sshadow[swaddr] = swdata;
      checks++;
      if (q !== shadow || sq !== sshadow) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
