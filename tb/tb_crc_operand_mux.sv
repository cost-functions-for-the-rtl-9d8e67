// tb_crc_operand_mux: random test of the FU input multiplexers at the default
// size (D = 32, 12 registers). Each select is checked against a direct index
// into the ports-then-registers source list.
module tb_crc_operand_mux;
  localparam int D = 32, NREGS = 12, SW = 4;
  int checks = 0, failures = 0;

  logic [SW-1:0] sel_a, sel_b, sel_sa, sel_sb;
  logic [3:0][D-1:0] din;
  logic [3:0] sin;
  logic [NREGS-1:0][D-1:0] dreg;
  logic [NREGS-1:0] sreg;
  logic [D-1:0] a, b;
  logic sa, sb;

  crc_operand_mux #(.D(D), .NREGS(NREGS)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [D-1:0] exp_d(int s);
    return (s < 4) ? din[s] : dreg[s - 4];
  endfunction
  function automatic logic exp_s(int s);
    return (s < 4) ? sin[s] : sreg[s - 4];
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      for (int p = 0; p < 4; p++) din[p] = $urandom;
      for (int r = 0; r < NREGS; r++) dreg[r] = $urandom;
      sin = 4'($urandom); sreg = NREGS'($urandom);
      sel_a = SW'($urandom); sel_b = SW'($urandom);
      sel_sa = SW'($urandom); sel_sb = SW'($urandom);
      #1;
      checks++;
      if (a !== exp_d(sel_a) || b !== exp_d(sel_b) || sa !== exp_s(sel_sa) || sb !== exp_s(sel_sb)) begin
        failures++;
        if (failures < 10) $display("FAIL sels %0d %0d %0d %0d", sel_a, sel_b, sel_sa, sel_sb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
