// tb_crc_boot_config: test of the boot-time configuration shift register at
// the default line length (4-bit address + 76-bit line). Random lines are
// shifted in MSB first; the address and line outputs, the write strobe, and
// the chain output (each bit reappears at dout after 80 shifts) are checked.
// A pause in shift must hold the register.
module tb_crc_boot_config;
  localparam int NCTX = 16, LW = 76, AW = 4, L = AW + LW;
  int checks = 0, failures = 0;

  logic clk = 0, rst, shift, din, write, dout, we;
  logic [AW-1:0] addr;
  logic [LW-1:0] line;
  logic [L-1:0] cur, prev;

  crc_boot_config #(.NCTX(NCTX), .LW(LW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; shift = 0; din = 0; write = 0;
    @(posedge clk); #1;
    rst = 0;
    prev = '0;
    for (int n = 0; n < 40; n++) begin
      cur = {$urandom, $urandom, $urandom};
      for (int i = L - 1; i >= 0; i--) begin
        shift = 1; din = cur[i];
        #1;
        // the bit leaving now is the matching bit of the previous line
        checks++;
        if (dout !== prev[i]) begin
          failures++;
          if (failures < 10) $display("FAIL chain out line %0d bit %0d", n, i);
        end
        @(posedge clk); #1;
        if (i == L / 2) begin
          shift = 0;
          repeat (3) @(posedge clk);
          #1;
        end
      end
      shift = 0; write = 1;
      #1;
      checks++;
      if (we !== 1'b1 || addr !== cur[L-1 -: AW] || line !== cur[LW-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL line %0d: addr %h line %h", n, addr, line);
      end
      @(posedge clk); #1;
      write = 0;
      #1;
      checks++;
      if (we !== 1'b0) failures++;
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
