// tb_signal_creator: self-checking test of the configuration sequencer.
//
// A 16-node instance (n = 4) with a dwell time of 5 cycles is run through
// three full rounds of the four configurations. The test keeps its own count
// of cycles and expected configuration, and checks every cycle: cfg, the
// one-hot bits C (C_cfg = 1, all others 0), cfg_first / cfg_last, and that
// every configuration lasts exactly DWELL cycles. It also checks that
// en = 0 freezes the sequencer and that reset returns to configuration 0.
module tb_signal_creator;

  localparam int unsigned N_LOG = 4;
  localparam int unsigned DWELL = 5;

  int checks = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       en = 1'b0;
  logic [1:0] cfg;
  logic [3:0] c;
  logic       cfg_first, cfg_last;

  signal_creator #(.N_LOG(N_LOG), .DWELL(DWELL)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .cfg(cfg), .c(c),
    .cfg_first(cfg_first), .cfg_last(cfg_last));

  always #5 clk = ~clk;

  int exp_cfg = 0;
  int exp_cnt = 0;   // cycles already spent in exp_cfg
  int seen [N_LOG];

  task automatic check_state(input string where);
    checks++;
    if (cfg !== 2'(exp_cfg) || c !== 4'(1 << exp_cfg) ||
        cfg_first !== (exp_cnt == 0) || cfg_last !== (exp_cnt == DWELL - 1)) begin
      failures++;
      $display("FAIL %s: cfg=%0d c=%b first=%0d last=%0d, expected cfg=%0d cnt=%0d",
               where, cfg, c, cfg_first, cfg_last, exp_cfg, exp_cnt);
    end
  endtask

  // Reference model, advanced once per enabled clock edge.
  task automatic step_model();
    if (exp_cnt == DWELL - 1) begin
      exp_cnt = 0;
      exp_cfg = (exp_cfg + 1) % N_LOG;
    end else begin
      exp_cnt++;
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run_len;
    int prev_cfg;
    repeat (2) @(posedge clk);
    #1 check_state("reset");
    @(negedge clk);
    rst_n = 1'b1;
    en    = 1'b1;
    // Three full rounds; measure the length of each configuration.
    run_len  = 0;
    prev_cfg = 0;
    for (int cyc = 0; cyc < 3 * N_LOG * DWELL; cyc++) begin
      @(posedge clk);
      step_model();
      #1 check_state("run");
      run_len++;
      if (cfg != 2'(prev_cfg)) begin
        checks++;
        if (run_len != DWELL) begin
          failures++;
          $display("FAIL configuration %0d lasted %0d cycles, expected %0d", prev_cfg, run_len, DWELL);
        end
        seen[cfg]++;
        run_len  = 0;
        prev_cfg = int'(cfg);
      end
    end
    for (int i = 0; i < N_LOG; i++) begin
      checks++;
      if (seen[i] < 2) begin
        failures++;
        $display("FAIL configuration %0d entered only %0d times", i, seen[i]);
      end
    end
    // Hold: nothing moves while en = 0.
    en = 1'b0;
    repeat (3 * DWELL) begin
      @(posedge clk);
      #1 check_state("hold");
    end
    en = 1'b1;
    repeat (DWELL + 2) begin
      @(posedge clk);
      step_model();
      #1 check_state("resume");
    end
    // Reset in mid-configuration.
    rst_n = 1'b0;
    #1;
    exp_cfg = 0;
    exp_cnt = 0;
    check_state("async reset");
    @(negedge clk);
    rst_n = 1'b1;
    repeat (DWELL * N_LOG) begin
      @(posedge clk);
      step_model();
      #1 check_state("after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
