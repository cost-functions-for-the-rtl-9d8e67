// tb_crc_port: random test of the output-port multiplexers for all four port
// positions (SELF = N, E, S, W). Checks that select 0 gives the FU output,
// 1..3 the other three inputs with the port's own input skipped, and 4..15
// the registers, separately for data and status.
module tb_crc_port;
  localparam int D = 32, NREGS = 12, SW = 4;
  int checks = 0, failures = 0;

  logic [3:0][SW-1:0] dsel, ssel;
  logic [3:0][D-1:0] din;
  logic [3:0] sin;
  logic [D-1:0] fu_y;
  logic fu_s;
  logic [NREGS-1:0][D-1:0] dreg;
  logic [NREGS-1:0] sreg;
  logic [3:0][D-1:0] dout;
  logic [3:0] sout;

  for (genvar p = 0; p < 4; p++) begin : g_dut
    crc_port #(.D(D), .NREGS(NREGS), .SELF(p)) dut (
      .dsel(dsel[p]), .ssel(ssel[p]), .din, .sin, .fu_y, .fu_s, .dreg, .sreg,
      .dout(dout[p]), .sout(sout[p]));
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Inputs other than `self`, in N,E,S,W order.
  function automatic int other_in(int self, int k);
    int n = 0;
    for (int q = 0; q < 4; q++) begin
      if (q != self) begin
        n++;
        if (n == k) return q;
      end
    end
    return -1;
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      for (int p = 0; p < 4; p++) din[p] = $urandom;
      for (int r = 0; r < NREGS; r++) dreg[r] = $urandom;
      sin = 4'($urandom); sreg = NREGS'($urandom);
      fu_y = $urandom; fu_s = 1'($urandom);
      for (int p = 0; p < 4; p++) begin dsel[p] = SW'($urandom); ssel[p] = SW'($urandom); end
      #1;
      for (int p = 0; p < 4; p++) begin
        logic [D-1:0] ed;
        logic es;
        int kd, ks;
        kd = int'(dsel[p]); ks = int'(ssel[p]);
        ed = (kd == 0) ? fu_y : (kd < 4) ? din[other_in(p, kd)] : dreg[kd - 4];
        es = (ks == 0) ? fu_s : (ks < 4) ? sin[other_in(p, ks)] : sreg[ks - 4];
        checks++;
        if (dout[p] !== ed || sout[p] !== es) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d dsel=%0d ssel=%0d", p, kd, ks);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
