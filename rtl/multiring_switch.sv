// multiring_switch: central switch of a uni-directional MultiRing of 2^n nodes.
//
// The nodes P_0 .. P_(N-1) are wired in a star to this switch. Every node has
// one transmit link into the switch and one receive link out of it. The switch
// forms 2^k rings of 2^(n-k) nodes (configuration k = 0 .. n-1), in which
// every node P_p sends to its right-hand neighbour P_((p + 2^k) mod N), and
// all N transfers happen at the same time without sharing any link.
// It reconfigures itself automatically: the control unit steps through the
// n configurations, holding each for DWELL cycles, and reports the current one
// on cfg / c so that the nodes know which ring they are in. The switch never
// looks at the data; it only provides the path.
//
// Structure:
//   control_unit      signal creator + OR network -> C_ij control terms
//   multiring_fabric  n columns of N/2 switch boxes steered by C_ij
//   output shuffle    fabric output port j drives node P_k with
//                     k = j/2 (j even) or k = N/2 + (j-1)/2 (j odd)
// The transmit link of P_i is fabric input port i.
//
// Timing: the data path node_tx -> node_rx is combinational (n switch boxes
// deep). The configuration is registered and changes on the clock edge after
// the last cycle of a dwell period (cfg_last = 1); cfg_first marks the first
// cycle of the new configuration. Nodes should only rely on a transfer while
// the configuration they need is shown on cfg.
//
// The organization, control assignment and node connection follow the
// published design, as does the one-bit link (one data bit per link and
// cycle). Wider links (WIDTH > 1), the dwell time DWELL, the enable input,
// the status outputs and the reset state are this design's choices.
module multiring_switch
  import mr_pkg::*;
#(
  parameter int unsigned N_LOG = 3,
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DWELL = 16,
  parameter sb_impl_e    IMPL  = SB_XOR,
  localparam int unsigned N     = 1 << N_LOG,
  localparam int unsigned CFG_W = (N_LOG > 1) ? $clog2(N_LOG) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,         // 1: keep cycling, 0: hold configuration
  input  logic [N-1:0][WIDTH-1:0] node_tx,    // node_tx[i]: data sent by P_i
  output logic [N-1:0][WIDTH-1:0] node_rx,    // node_rx[k]: data received by P_k
  output logic [CFG_W-1:0]        cfg,        // current configuration k: 2^k rings
  output logic [N_LOG-1:0]        c,          // one-hot configuration bits C_0..C_(n-1)
  output logic                    cfg_first,  // first cycle of the configuration
  output logic                    cfg_last    // last cycle before reconfiguration
);

  localparam int unsigned NC   = N_LOG * (N_LOG + 1) / 2;

  logic [NC-1:0]              cij;
  logic [N-1:0][WIDTH-1:0]    fab_out;

  control_unit #(
    .N_LOG(N_LOG),
    .DWELL(DWELL)
  ) u_control_unit (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .cfg      (cfg),
    .c        (c),
    .cfg_first(cfg_first),
    .cfg_last (cfg_last),
    .cij      (cij)
  );

  multiring_fabric #(
    .N_LOG(N_LOG),
    .WIDTH(WIDTH),
    .IMPL (IMPL)
  ) u_fabric (
    .in_port (node_tx),
    .cij     (cij),
    .out_port(fab_out),
    .box_c   ()
  );

  // Perfect shuffle from the last column to the nodes.
  for (genvar j = 0; j < N; j++) begin : g_shuffle
    assign node_rx[shuffle_node(j, N_LOG)] = fab_out[j];
  end

endmodule
