// tb_multiring_switch: end-to-end test of the MultiRing switch at its default
// size (8 nodes, 1-bit links, 16-cycle dwell).
//
// The eight nodes are modelled by mr_node_array: in every configuration they
// circulate words around their rings while the switch steps on its own
// through 1 ring of 8, 2 rings of 4 and 4 rings of 2 nodes. The run covers
// four rounds of the three configurations, a hold of the sequencer (en = 0)
// in the middle of a configuration, and a reset in the middle of the run.
module tb_multiring_switch;

  localparam int unsigned N_LOG = 3;
  localparam int unsigned WIDTH = 1;
  localparam int unsigned DWELL = 16;
  localparam int unsigned N     = 1 << N_LOG;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b1;
  logic report = 1'b0;
  int   resets = 0;

  logic [N-1:0][WIDTH-1:0] node_tx, node_rx;
  logic [1:0]              cfg;
  logic [N_LOG-1:0]        c;
  logic                    cfg_first, cfg_last;
  int                      checks, failures;

  always #5 clk = ~clk;

  multiring_switch dut (
    .clk(clk), .rst_n(rst_n), .en(en), .node_tx(node_tx), .node_rx(node_rx),
    .cfg(cfg), .c(c), .cfg_first(cfg_first), .cfg_last(cfg_last));

  mr_node_array #(.N_LOG(N_LOG), .WIDTH(WIDTH), .DWELL(DWELL)) nodes (
    .clk(clk), .rst_n(rst_n), .en(en), .report(report), .node_tx(node_tx),
    .node_rx(node_rx), .cfg(cfg), .c(c), .cfg_first(cfg_first),
    .checks(checks), .failures(failures));

  int extra_checks = 0;
  int extra_failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(posedge clk) #2 rst_n = 1'b1;
    // Two rounds.
    repeat (2 * N_LOG * DWELL) @(posedge clk);
    // Hold in the middle of a configuration.
    repeat (DWELL / 2) @(posedge clk);
    @(negedge clk) en = 1'b0;
    repeat (3 * DWELL) @(posedge clk);
    @(negedge clk) en = 1'b1;
    repeat (N_LOG * DWELL) @(posedge clk);
    // Reset in the middle of the run; the switch must restart at 1 ring of 8.
    repeat (5) @(posedge clk);
    @(posedge clk) #2 rst_n = 1'b0;
    resets++;
    #1;
    extra_checks++;
    if (cfg !== '0 || !cfg_first) begin
      extra_failures++;
      $display("FAIL reset did not return to configuration 0");
    end
    repeat (2) @(posedge clk);
    @(posedge clk) #2 rst_n = 1'b1;
    repeat (N_LOG * DWELL + 3) @(posedge clk);
    @(negedge clk) report = 1'b1;
    #2;
    extra_checks++;
    if (resets == 0) begin
      extra_failures++;
      $display("FAIL no reset applied");
    end
    $display("resets applied: %0d", resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures);
    $finish;
  end
endmodule
