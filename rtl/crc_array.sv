// crc_array: array of processing elements with nearest-neighbour interconnect.
//
// ROWS x COLS identical PEs (crc_pe). Each PE's N, E, S and W ports connect to
// the facing port of its neighbour; ports on the border of the array are the
// device's ports. There is no shared controller: every PE runs its own FSM,
// and PEs cooperate only through the data and status signals on their ports.
// A value can therefore be computed in one PE, passed through further PEs
// (each of which may at the same time compute something else), and consumed
// by a later PE's FU, register or FSM in the same clock cycle (an operator
// chain). The array has no memory block.
//
// Boot: with run low, the configuration shift registers of all PEs form one
// serial chain in row-major order (PE (0,0) first, fed by cfg_din; the last
// PE drives cfg_dout). Shift ROWS*COLS lines of STW+CW+FW bits in, most
// significant bit first and the line for the last PE first, then pulse
// cfg_write to store one line in every PE. Repeat per state. Raising run
// starts all PEs in state 0.
//
// Interface: n_*[c] / s_*[c] are the north / south border ports of column c,
// e_*[r] / w_*[r] the east / west border ports of row r; *_din/_sin are
// inputs to the array, *_dout/_sout outputs. pe_state[r*COLS+c] is the state
// (= context) of PE (r, c).
//
// The array size is this design's choice (2 x 3 as drawn for the general
// model); the document only calls for an array of uniform PEs. The port
// multiplexers of neighbouring PEs form structural combinational loops; they
// are inherent in the routing network, and a valid configuration never
// selects a closed loop in any cycle.
module crc_array #(
  parameter int unsigned D     = 32,
  parameter int unsigned NREGS = 12,
  parameter int unsigned NCTX  = 16,
  parameter int unsigned ROWS  = 2,
  parameter int unsigned COLS  = 3,
  localparam int unsigned STW  = (NCTX > 1) ? $clog2(NCTX) : 1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       run,
  input  logic                       cfg_shift,
  input  logic                       cfg_din,
  input  logic                       cfg_write,
  output logic                       cfg_dout,
  input  logic [COLS-1:0][D-1:0]     n_din,
  input  logic [COLS-1:0]            n_sin,
  output logic [COLS-1:0][D-1:0]     n_dout,
  output logic [COLS-1:0]            n_sout,
  input  logic [COLS-1:0][D-1:0]     s_din,
  input  logic [COLS-1:0]            s_sin,
  output logic [COLS-1:0][D-1:0]     s_dout,
  output logic [COLS-1:0]            s_sout,
  input  logic [ROWS-1:0][D-1:0]     e_din,
  input  logic [ROWS-1:0]            e_sin,
  output logic [ROWS-1:0][D-1:0]     e_dout,
  output logic [ROWS-1:0]            e_sout,
  input  logic [ROWS-1:0][D-1:0]     w_din,
  input  logic [ROWS-1:0]            w_sin,
  output logic [ROWS-1:0][D-1:0]     w_dout,
  output logic [ROWS-1:0]            w_sout,
  output logic [ROWS*COLS-1:0][STW-1:0] pe_state
);

  import crc_pkg::PN;
  import crc_pkg::PE;
  import crc_pkg::PS;
  import crc_pkg::PW;

  logic [3:0][D-1:0] pdi [ROWS][COLS];
  logic [3:0]        psi [ROWS][COLS];
  logic [3:0][D-1:0] pdo [ROWS][COLS];
  logic [3:0]        pso [ROWS][COLS];
  logic              chain [ROWS*COLS+1];

  assign chain[0] = cfg_din;
  assign cfg_dout = chain[ROWS*COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      // North input
      if (r == 0) begin : g_nb
        assign pdi[r][c][PN] = n_din[c];
        assign psi[r][c][PN] = n_sin[c];
        assign n_dout[c]     = pdo[r][c][PN];
        assign n_sout[c]     = pso[r][c][PN];
      end else begin : g_nn
        assign pdi[r][c][PN] = pdo[r-1][c][PS];
        assign psi[r][c][PN] = pso[r-1][c][PS];
      end
      // South input
      if (r == ROWS - 1) begin : g_sb
        assign pdi[r][c][PS] = s_din[c];
        assign psi[r][c][PS] = s_sin[c];
        assign s_dout[c]     = pdo[r][c][PS];
        assign s_sout[c]     = pso[r][c][PS];
      end else begin : g_sn
        assign pdi[r][c][PS] = pdo[r+1][c][PN];
        assign psi[r][c][PS] = pso[r+1][c][PN];
      end
      // West input
      if (c == 0) begin : g_wb
        assign pdi[r][c][PW] = w_din[r];
        assign psi[r][c][PW] = w_sin[r];
        assign w_dout[r]     = pdo[r][c][PW];
        assign w_sout[r]     = pso[r][c][PW];
      end else begin : g_wn
        assign pdi[r][c][PW] = pdo[r][c-1][PE];
        assign psi[r][c][PW] = pso[r][c-1][PE];
      end
      // East input
      if (c == COLS - 1) begin : g_eb
        assign pdi[r][c][PE] = e_din[r];
        assign psi[r][c][PE] = e_sin[r];
        assign e_dout[r]     = pdo[r][c][PE];
        assign e_sout[r]     = pso[r][c][PE];
      end else begin : g_en
        assign pdi[r][c][PE] = pdo[r][c+1][PW];
        assign psi[r][c][PE] = pso[r][c+1][PW];
      end

      crc_pe #(.D(D), .NREGS(NREGS), .NCTX(NCTX)) u_pe (
        .clk, .rst, .run,
        .cfg_shift (cfg_shift),
        .cfg_din   (chain[r*COLS+c]),
        .cfg_write (cfg_write),
        .cfg_dout  (chain[r*COLS+c+1]),
        .din       (pdi[r][c]),
        .sin       (psi[r][c]),
        .dout      (pdo[r][c]),
        .sout      (pso[r][c]),
        .state     (pe_state[r*COLS+c])
      );
    end
  end

endmodule
