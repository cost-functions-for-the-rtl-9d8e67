// tb_crc_context_mem: context memory test at the default size (16 words of
// 63 bits). Checks reset to all-zero words, writes to every address,
// combinational read of any address in the same cycle, and that a write
// touches only its own word.
module tb_crc_context_mem;
  localparam int NCTX = 16, CW = 63;
  int checks = 0, failures = 0;

  logic clk = 0, rst, we;
  logic [3:0] waddr, raddr;
  logic [CW-1:0] wdata, rdata;
  logic [CW-1:0] shadow [NCTX];

  crc_context_mem #(.NCTX(NCTX), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < NCTX; i++) begin
      raddr = 4'(i);
      #1;
      checks++;
      if (rdata !== shadow[i]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: %h expected %h", i, rdata, shadow[i]);
      end
    end
  endtask

  initial begin
    rst = 1; we = 0; waddr = 0; raddr = 0; wdata = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < NCTX; i++) shadow[i] = '0;
    check_all();
    for (int n = 0; n < 400; n++) begin
      we = 1'($urandom);
      waddr = 4'($urandom);
      wdata = {$urandom, $urandom};
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      we = 0;
      if (n % 20 == 0) check_all();
      else begin
        raddr = 4'($urandom);
        #1;
        checks++;
        if (rdata !== shadow[raddr]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
