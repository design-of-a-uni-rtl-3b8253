// mr_join_column: the column that joins two 2^(n-1)-node MultiRing switches
// into one 2^n-node switch.
//
// The last-column outputs of the upper switch arrive on in_port[0 .. N/2-1]
// and those of the lower switch on in_port[N/2 .. N-1]. In the column of N/2
// new switch boxes, input port k is fed from incoming port j as follows
// (h = N/2):
//   j <  h : j even -> k = j,  j odd  -> k = j + h - 1
//   j >= h : j odd  -> k = j,  j even -> k = j - h + 1
// so every box pairs one port of the upper switch with one of the lower
// switch. For 16 nodes, incoming ports 0..15 go to box inputs
// 0 8 2 10 4 12 6 14 1 9 3 11 5 13 7 15.
// Box row r takes the control term C_i(n-1), with i = 0 when r = 0 and
// otherwise 2^(i-1) <= r < 2^i. c_col[i] carries C_i(n-1).
//
// Ports are numbered top to bottom; port p is input/output (p mod 2) of the
// box in row p/2. Purely combinational, one box deep. box_c reports each
// box's control bit. The wiring and control rule follow the published
// recursive construction; packaging the column as a module of its own is
// this design's choice.
module mr_join_column
  import mr_pkg::*;
#(
  parameter int unsigned N_LOG = 3,
  parameter int unsigned WIDTH = 1,
  parameter sb_impl_e    IMPL  = SB_XOR,
  localparam int unsigned N    = 1 << N_LOG,
  localparam int unsigned ROWS = N / 2
) (
  input  logic [N-1:0][WIDTH-1:0] in_port,
  input  logic [N_LOG-1:0]        c_col,
  output logic [N-1:0][WIDTH-1:0] out_port,
  output logic [ROWS-1:0]         box_c
);

  logic [N-1:0][WIDTH-1:0] box_in;

  for (genvar j = 0; j < N; j++) begin : g_link
    assign box_in[stage_dest(j, N_LOG - 1)] = in_port[j];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_box
    assign box_c[r] = c_col[box_ctrl_sel(r, N_LOG - 1)];

    switch_box #(
      .WIDTH(WIDTH),
      .IMPL (IMPL)
    ) u_box (
      .i0(box_in[2*r]),
      .i1(box_in[2*r+1]),
      .c (box_c[r]),
      .o0(out_port[2*r]),
      .o1(out_port[2*r+1])
    );
  end

endmodule
