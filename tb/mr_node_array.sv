// mr_node_array: behavioural model of the 2^n nodes attached to the
// MultiRing switch, with the checks of the end-to-end tests.
//
// Nodes work bit-serially on WIDTH-bit links. At the start of every
// configuration period each node picks a random word; from then on, in every
// cycle each node sends the word it holds and keeps the word it receives, so
// the words circulate around every ring at once. All activity happens at the
// falling clock edge (the switch data path is combinational).
//
// Checks, all worked out from the ring rule alone (configuration k: P_p
// sends to P_((p + 2^k) mod N)):
//   - every cycle every node receives exactly what its left-hand neighbour
//     sent,
//   - after t cycles node P_i holds the start word of P_((i - t 2^k) mod N),
//     and after one full trip around its ring (2^(n-k) cycles) its own,
//   - c is the one-hot code of cfg, cfg_first is set on the first cycle of a
//     configuration, and a configuration that is never held by en = 0 lasts
//     exactly DWELL cycles.
// Mechanisms counted: every configuration entered, a ring trip completed in
// every configuration, the wrap from the last configuration to the first,
// cycles held by en = 0. When `report` rises, one that never happened counts
// as a failure.
module mr_node_array #(
  parameter int unsigned N_LOG = 3,
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DWELL = 16,
  localparam int unsigned N     = 1 << N_LOG,
  localparam int unsigned CFG_W = (N_LOG > 1) ? $clog2(N_LOG) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    report,
  output logic [N-1:0][WIDTH-1:0] node_tx,
  input  logic [N-1:0][WIDTH-1:0] node_rx,
  input  logic [CFG_W-1:0]        cfg,
  input  logic [N_LOG-1:0]        c,
  input  logic                    cfg_first,
  output int                      checks,
  output int                      failures
);

  logic [N-1:0][WIDTH-1:0] init_w, cur_w, next_w;
  int cfg_seen [N_LOG];
  int trips    [N_LOG];
  int wraps;
  int holds;
  int prev_cfg;
  int t;
  int len;
  bit held;

  initial begin
    checks   = 0;
    failures = 0;
    wraps    = 0;
    holds    = 0;
    prev_cfg = -1;
    node_tx  = '0;
    for (int i = 0; i < N_LOG; i++) begin
      cfg_seen[i] = 0;
      trips[i]    = 0;
    end
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  always @(negedge clk) begin
    int k, step, ring_len;
    if (!rst_n) begin
      prev_cfg = -1;
    end else begin
      k        = int'(cfg);
      step     = 1 << k;
      ring_len = N >> k;
      checks++;
      if (c !== N_LOG'(1) << k) fail($sformatf("c=%b does not encode cfg=%0d", c, k));
      if (k != prev_cfg) begin
        if (prev_cfg >= 0) begin
          if (!held) begin
            checks++;
            if (len != int'(DWELL))
              fail($sformatf("configuration %0d lasted %0d cycles, expected %0d", prev_cfg, len, DWELL));
          end
          checks++;
          if (k != (prev_cfg + 1) % int'(N_LOG))
            fail($sformatf("configuration %0d followed by %0d", prev_cfg, k));
          if (prev_cfg == int'(N_LOG) - 1 && k == 0) wraps++;
        end
        checks++;
        if (!cfg_first) fail($sformatf("cfg_first low on the first cycle of configuration %0d", k));
        cfg_seen[k]++;
        prev_cfg = k;
        t    = 0;
        len  = 0;
        held = 1'b0;
        for (int i = 0; i < int'(N); i++) init_w[i] = WIDTH'($urandom);
        cur_w = init_w;
      end
      node_tx = cur_w;
      #1;
      next_w = node_rx;
      t++;
      len++;
      if (!en) begin
        held = 1'b1;
        holds++;
      end
      for (int i = 0; i < int'(N); i++) begin
        int left, origin;
        left   = (i - step + int'(N)) % int'(N);
        origin = ((i - ((t * step) % int'(N))) % int'(N) + int'(N)) % int'(N);
        checks += 2;
        if (node_rx[i] !== cur_w[left])
          fail($sformatf("cfg %0d: P%0d received %h, P%0d sent %h", k, i, node_rx[i], left, cur_w[left]));
        if (next_w[i] !== init_w[origin])
          fail($sformatf("cfg %0d step %0d: P%0d holds %h, expected start word of P%0d", k, t, i, next_w[i], origin));
      end
      if (t % ring_len == 0) begin
        checks++;
        if (next_w != init_w) fail($sformatf("cfg %0d: words not back home after %0d steps", k, t));
        else trips[k]++;
      end
      cur_w = next_w;
    end
  end

  always @(posedge report) begin
    for (int i = 0; i < int'(N_LOG); i++) begin
      $display("configuration %0d (%0d rings of %0d nodes): entered %0d times, %0d ring trips",
               i, 1 << i, N >> i, cfg_seen[i], trips[i]);
      checks += 2;
      if (cfg_seen[i] == 0) fail($sformatf("configuration %0d never entered", i));
      if (trips[i] == 0) fail($sformatf("no complete ring trip in configuration %0d", i));
    end
    $display("wraps to the first configuration: %0d, cycles held: %0d", wraps, holds);
    checks += 2;
    if (wraps == 0) fail("sequencer never wrapped to the first configuration");
    if (holds == 0) fail("configuration never held");
  end

endmodule
