// multiring_fabric: switch-box network of a 2^n-node MultiRing switch.
//
// N = 2^n ports, n columns of N/2 switch boxes S_rs (row r, column s).
// Port p of a column is input/output (p mod 2) of the box in row p/2.
//
// The fabric is built the way the MultiRing switch scales: a 2^n-node fabric
// is two 2^(n-1)-node fabrics, one on top of the other, whose outputs feed a
// joining column of N/2 boxes (mr_join_column). Unrolled, column s consists
// of N/2^(s+1) joining columns, each of which merges two 2^s-node switches
// (the upper and lower halves of a group of 2^(s+1) ports) into one
// 2^(s+1)-node switch. Column 0 merges single nodes into 2-node switches
// and reduces to plain boxes. Group g of column s takes ports
// g*2^(s+1) .. (g+1)*2^(s+1)-1 of column s-1's outputs.
//
// Control: box S_rs is steered by C_is, where i = 0 if r mod 2^s = 0 and
// otherwise 2^(i-1) <= r mod 2^s < 2^i (mr_pkg::box_ctrl_sel). Every joining
// column of column s receives C_0s .. C_ss and applies this rule to its own
// rows, which equal r mod 2^s. For n = 3:
//        s=0   s=1   s=2
//   r=0  C00   C01   C02
//   r=1  C00   C11   C12
//   r=2  C00   C01   C22
//   r=3  C00   C11   C22
//
// With the one-hot configuration k applied, input port p reaches the output
// port that the node permutation (see multiring_switch) maps to node
// (p + 2^k) mod N, and no two paths share a link. The fabric is purely
// combinational, n boxes deep. box_c[s][r] reports the control bit of every
// box for observation. Structure, wiring and control assignment follow the
// published organization.
module multiring_fabric
  import mr_pkg::*;
#(
  parameter int unsigned N_LOG = 3,
  parameter int unsigned WIDTH = 1,
  parameter sb_impl_e    IMPL  = SB_XOR,
  localparam int unsigned N    = 1 << N_LOG,
  localparam int unsigned ROWS = N / 2,
  localparam int unsigned NC   = N_LOG * (N_LOG + 1) / 2
) (
  input  logic [N-1:0][WIDTH-1:0]     in_port,
  input  logic [NC-1:0]               cij,
  output logic [N-1:0][WIDTH-1:0]     out_port,
  output logic [N_LOG-1:0][ROWS-1:0]  box_c
);

  for (genvar s = 0; s < N_LOG; s++) begin : g_stage
    localparam int unsigned GP = 1 << (s + 1);   // ports per joining column
    localparam int unsigned GR = GP / 2;         // boxes per joining column

    logic [N-1:0][WIDTH-1:0] col_in;
    logic [N-1:0][WIDTH-1:0] col_out;
    logic [s:0]              c_col;              // C_0s .. C_ss

    if (s == 0) begin : g_first
      assign col_in = in_port;
    end else begin : g_next
      assign col_in = g_stage[s-1].col_out;
    end

    for (genvar i = 0; i <= s; i++) begin : g_c
      assign c_col[i] = cij[cij_index(N_LOG, i, s)];
    end

    for (genvar g = 0; g < N / GP; g++) begin : g_grp
      mr_join_column #(
        .N_LOG(s + 1),
        .WIDTH(WIDTH),
        .IMPL (IMPL)
      ) u_join (
        .in_port (col_in[g*GP +: GP]),
        .c_col   (c_col),
        .out_port(col_out[g*GP +: GP]),
        .box_c   (box_c[s][g*GR +: GR])
      );
    end
  end

  assign out_port = g_stage[N_LOG-1].col_out;

endmodule
