// tb_multiring_switch_scaled: end-to-end test of larger MultiRing switches.
//
// Two switches run side by side, each with its own node model
// (mr_node_array): a 16-node switch with 8-bit links built from the
// seven-gate AND/OR boxes, and a 64-node switch with 4-bit links built from
// the six-gate XOR boxes. The dwell time of each is at least the length of
// its largest ring, so that words can make a full trip around every ring in
// every configuration. Each run covers several rounds of all configurations,
// a hold (en = 0) and a reset in the middle of the run.
module tb_multiring_switch_scaled;
  import mr_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b1;
  logic report = 1'b0;
  always #5 clk = ~clk;

  // 16 nodes.
  logic [15:0][7:0] tx16, rx16;
  logic [1:0]       cfg16;
  logic [3:0]       c16;
  logic             first16, last16;
  int               checks16, failures16;

  multiring_switch #(.N_LOG(4), .WIDTH(8), .DWELL(20), .IMPL(SB_AND_OR)) dut16 (
    .clk(clk), .rst_n(rst_n), .en(en), .node_tx(tx16), .node_rx(rx16),
    .cfg(cfg16), .c(c16), .cfg_first(first16), .cfg_last(last16));

  mr_node_array #(.N_LOG(4), .WIDTH(8), .DWELL(20)) nodes16 (
    .clk(clk), .rst_n(rst_n), .en(en), .report(report), .node_tx(tx16),
    .node_rx(rx16), .cfg(cfg16), .c(c16), .cfg_first(first16),
    .checks(checks16), .failures(failures16));

  // 64 nodes.
  logic [63:0][3:0] tx64, rx64;
  logic [2:0]       cfg64;
  logic [5:0]       c64;
  logic             first64, last64;
  int               checks64, failures64;

  multiring_switch #(.N_LOG(6), .WIDTH(4), .DWELL(70)) dut64 (
    .clk(clk), .rst_n(rst_n), .en(en), .node_tx(tx64), .node_rx(rx64),
    .cfg(cfg64), .c(c64), .cfg_first(first64), .cfg_last(last64));

  mr_node_array #(.N_LOG(6), .WIDTH(4), .DWELL(70)) nodes64 (
    .clk(clk), .rst_n(rst_n), .en(en), .report(report), .node_tx(tx64),
    .node_rx(rx64), .cfg(cfg64), .c(c64), .cfg_first(first64),
    .checks(checks64), .failures(failures64));

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks16 + checks64, failures16 + failures64 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(posedge clk) #2 rst_n = 1'b1;
    repeat (2 * 6 * 70) @(posedge clk);
    repeat (35) @(posedge clk);
    @(negedge clk) en = 1'b0;
    repeat (100) @(posedge clk);
    @(negedge clk) en = 1'b1;
    repeat (6 * 70) @(posedge clk);
    @(posedge clk) #2 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(posedge clk) #2 rst_n = 1'b1;
    repeat (6 * 70 + 3) @(posedge clk);
    @(negedge clk) report = 1'b1;
    #2;
    $display("TB_RESULT checks=%0d failures=%0d", checks16 + checks64, failures16 + failures64);
    $finish;
  end
endmodule
