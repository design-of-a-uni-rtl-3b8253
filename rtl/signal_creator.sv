// signal_creator: automatic configuration sequencer of the MultiRing switch.
//
// The switch cycles on its own through all n ring configurations of a
// 2^n-node MultiRing: configuration 0 (one ring of 2^n nodes), then 1
// (two rings of 2^(n-1) nodes), ... up to n-1 (2^(n-1) rings of two nodes),
// and back to 0. It holds each configuration for DWELL clock cycles.
// For configuration i it drives the one-hot control bits C_i = 1, C_j = 0
// (j != i), which the control unit turns into the switch-box controls.
//
// Interface: cfg is the index i of the current configuration, c the one-hot
// bits C_0..C_(n-1), cfg_first is high in the first cycle of a configuration
// and cfg_last in its last cycle, so that nodes know when a ring is about to
// change. cfg is a register and the other outputs are decoded from it and
// from the dwell counter: a new configuration takes effect right after the
// clock edge that ends the DWELL-th cycle of the previous one.
//
// The cycling order and the one-hot code follow the published design. The
// dwell time (not given there, "a set time"), the enable input (en = 0
// freezes the sequencer and the current configuration) and the reset state
// (configuration 0, at the start of its dwell) are this design's choices.
module signal_creator #(
  parameter int unsigned N_LOG = 3,   // n: the MultiRing has 2^n nodes
  parameter int unsigned DWELL = 16,  // cycles spent in each configuration
  localparam int unsigned CFG_W = (N_LOG > 1) ? $clog2(N_LOG) : 1,
  localparam int unsigned DW_W  = (DWELL > 1) ? $clog2(DWELL) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [CFG_W-1:0] cfg,
  output logic [N_LOG-1:0] c,
  output logic             cfg_first,
  output logic             cfg_last
);

  logic [DW_W-1:0] dwell_cnt;   // cycles already spent in cfg

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg       <= '0;
      dwell_cnt <= '0;
    end else if (en) begin
      if (dwell_cnt == DW_W'(DWELL - 1)) begin
        dwell_cnt <= '0;
        cfg       <= (cfg == CFG_W'(N_LOG - 1)) ? '0 : cfg + 1'b1;
      end else begin
        dwell_cnt <= dwell_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    c      = '0;
    c[cfg] = 1'b1;
  end

  assign cfg_first = (dwell_cnt == '0);
  assign cfg_last  = (dwell_cnt == DW_W'(DWELL - 1));

  initial begin
    assert (N_LOG >= 2) else $error("signal_creator: N_LOG must be at least 2");
    assert (DWELL >= 1) else $error("signal_creator: DWELL must be at least 1");
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(c));

endmodule
