// control_unit: control unit of a 2^n-node MultiRing switch.
//
// It holds the signal creator, which produces the one-hot configuration bits
// C_0 .. C_(n-1), and an OR network that forms all n(n+1)/2 control inputs
//   C_ij = C_i | C_(i+1) | ... | C_j,   0 <= i <= j <= n-1.
// C_ii is C_i itself; every other term costs one two-input OR gate,
// C_ij = C_i(j-1) | C_j, so the network has n(n-1)/2 gates, the count the
// published design gives. For configuration k the result is C_ij = 1 exactly
// when i <= k <= j.
//
// Interface: cij is the flat vector of the C_ij terms in the order of
// mr_pkg::cij_index (C_00, C_01, .., C_0(n-1), C_11, ..). cfg, c, cfg_first
// and cfg_last are passed on from the signal creator. The OR network is
// combinational, so cij changes in the same cycle as c, right after the clock
// edge on which the signal creator moves to a new configuration.
// The structure follows the published control unit; the chaining order of
// the OR gates is this design's choice.
module control_unit
  import mr_pkg::*;
#(
  parameter int unsigned N_LOG = 3,
  parameter int unsigned DWELL = 16,
  localparam int unsigned CFG_W = (N_LOG > 1) ? $clog2(N_LOG) : 1,
  localparam int unsigned NC    = N_LOG * (N_LOG + 1) / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [CFG_W-1:0] cfg,
  output logic [N_LOG-1:0] c,
  output logic             cfg_first,
  output logic             cfg_last,
  output logic [NC-1:0]    cij
);

  signal_creator #(
    .N_LOG(N_LOG),
    .DWELL(DWELL)
  ) u_signal_creator (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .cfg      (cfg),
    .c        (c),
    .cfg_first(cfg_first),
    .cfg_last (cfg_last)
  );

  // Row i of the network: t of column j holds C_ij.
  for (genvar i = 0; i < N_LOG; i++) begin : g_row
    for (genvar j = i; j < N_LOG; j++) begin : g_col
      logic t;
      if (j == i) begin : g_diag
        assign t = c[j];
      end else begin : g_or
        assign t = g_col[j-1].t | c[j];
      end
      assign cij[cij_index(N_LOG, i, j)] = t;
    end
  end

endmodule
