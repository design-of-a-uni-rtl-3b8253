// tb_multiring_fabric: self-checking test of the switch-box fabric.
//
// 8-node fabric (n = 3), 8-bit links: for each of the three configurations
// the control terms are set from their definition (C_ij = 1 when
// i <= k <= j), every node input carries a distinct token, and the test
// checks
//   - the control bit of all twelve boxes against the listed 8-node tables
//     (1 ring of 8, 2 rings of 4, 4 rings of 2),
//   - for every source, the box row it passes in each column against the
//     listed communication paths (e.g. P0 -> P1 in 1 ring of 8 goes through
//     S00, S11, S12),
//   - that each token leaves on the output port of its destination node;
//     the output ports carry, from top to bottom, the nodes
//     P0 P4 P1 P5 P2 P6 P3 P7.
// 16-, 32- and 64-node fabrics (n = 4, 5, 6) are checked against the ring
// rule alone: in configuration k the token of P_p must reach the port of
// node (p + 2^k) mod N, where node k' sits on port 2k' (k' < N/2) or
// 2(k' - N/2) + 1 (k' >= N/2).
module tb_multiring_fabric;
  import mr_pkg::*;

  int checks = 0;
  int failures = 0;

  // ---------------- 8-node fabric with listed tables ----------------
  logic [7:0][7:0]  in3, out3;
  logic [5:0]       cij3;
  logic [2:0][3:0]  boxc3;

  multiring_fabric #(.N_LOG(3), .WIDTH(8)) dut3 (
    .in_port(in3), .cij(cij3), .out_port(out3), .box_c(boxc3));

  // Box rows on the path of source P_p, columns 0,1,2, per configuration.
  localparam int PATH [3][8][3] = '{
    '{'{0,1,1}, '{0,0,2}, '{1,1,3}, '{1,0,0}, '{2,3,1}, '{2,2,2}, '{3,3,3}, '{3,2,0}},
    '{'{0,0,2}, '{0,1,3}, '{1,0,0}, '{1,1,1}, '{2,2,2}, '{2,3,3}, '{3,2,0}, '{3,3,1}},
    '{'{0,0,0}, '{0,1,1}, '{1,0,2}, '{1,1,3}, '{2,2,0}, '{2,3,1}, '{3,2,2}, '{3,3,3}}
  };
  // Box control bits [configuration][row][column].
  localparam logic BOXC [3][4][3] = '{
    '{'{1,1,1}, '{1,0,0}, '{1,1,0}, '{1,0,0}},
    '{'{0,1,1}, '{0,1,1}, '{0,1,0}, '{0,1,0}},
    '{'{0,0,1}, '{0,0,1}, '{0,0,1}, '{0,0,1}}
  };
  // Node attached to each output port, top to bottom.
  localparam int PORT_NODE [8] = '{0, 4, 1, 5, 2, 6, 3, 7};
  localparam int RING_STEP [3] = '{1, 2, 4};

  function automatic logic [7:0] col_in3(input int s, input int p);
    // Box inputs of column s: column 0 is fed by the fabric inputs, column 1
    // by the joining columns of the two 4-node halves, column 2 by the 8-node
    // joining column.
    case (s)
      0: return in3[p];
      1: return (p < 4) ? dut3.g_stage[1].g_grp[0].u_join.box_in[p]
                        : dut3.g_stage[1].g_grp[1].u_join.box_in[p - 4];
      default: return dut3.g_stage[2].g_grp[0].u_join.box_in[p];
    endcase
  endfunction

  function automatic int find_port(input int s, input logic [7:0] tok);
    for (int p = 0; p < 8; p++)
      if (col_in3(s, p) == tok) return p;
    return -1;
  endfunction

  logic done3 = 1'b0;

  initial begin
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < 3; i++)
        for (int j = i; j < 3; j++)
          cij3[cij_index(3, i, j)] = (i <= k && k <= j);
      for (int p = 0; p < 8; p++) in3[p] = 8'(8'hA0 + p);
      #1;
      for (int r = 0; r < 4; r++)
        for (int s = 0; s < 3; s++) begin
          checks++;
          if (boxc3[s][r] !== BOXC[k][r][s]) begin
            failures++;
            $display("FAIL cfg %0d: control of S%0d%0d is %0d, expected %0d", k, r, s, boxc3[s][r], BOXC[k][r][s]);
          end
        end
      for (int p = 0; p < 8; p++) begin
        for (int s = 0; s < 3; s++) begin
          checks++;
          if (find_port(s, 8'(8'hA0 + p)) / 2 != PATH[k][p][s]) begin
            failures++;
            $display("FAIL cfg %0d: P%0d enters column %0d at row %0d, expected S%0d%0d",
                     k, p, s, find_port(s, 8'(8'hA0 + p)) / 2, PATH[k][p][s], s);
          end
        end
      end
      for (int j = 0; j < 8; j++) begin
        int src;
        src = (PORT_NODE[j] - RING_STEP[k] + 8) % 8;
        checks++;
        if (out3[j] !== 8'(8'hA0 + src)) begin
          failures++;
          $display("FAIL cfg %0d: port %0d (P%0d) carries %h, expected token of P%0d",
                   k, j, PORT_NODE[j], out3[j], src);
        end
      end
    end
    done3 = 1'b1;
  end

  // ---------------- larger fabrics, ring rule ----------------
  localparam int NLS [3] = '{4, 5, 6};
  logic [2:0] done_big = '0;

  for (genvar g = 0; g < 3; g++) begin : g_big
    localparam int NL = NLS[g];
    localparam int N  = 1 << NL;
    localparam int NC = NL * (NL + 1) / 2;
    logic [N-1:0][7:0]     din, dout;
    logic [NC-1:0]         cij;
    logic [NL-1:0][N/2-1:0] bc;

    multiring_fabric #(.N_LOG(NL), .WIDTH(8)) dut (
      .in_port(din), .cij(cij), .out_port(dout), .box_c(bc));

    initial begin
      #10;
      for (int k = 0; k < NL; k++) begin
        for (int i = 0; i < NL; i++)
          for (int j = i; j < NL; j++)
            cij[cij_index(NL, i, j)] = (i <= k && k <= j);
        for (int p = 0; p < N; p++) din[p] = 8'(p + 1);
        #1;
        for (int p = 0; p < N; p++) begin
          int d, port;
          d    = (p + (1 << k)) % N;
          port = (d < N / 2) ? 2 * d : 2 * (d - N / 2) + 1;
          checks++;
          if (dout[port] !== 8'(p + 1)) begin
            failures++;
            $display("FAIL n=%0d cfg %0d: P%0d should reach P%0d on port %0d, port carries %0d",
                     NL, k, p, d, port, dout[port]);
          end
        end
      end
      done_big[g] = 1'b1;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done3 && &done_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
