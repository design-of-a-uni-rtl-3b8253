// mr_pkg: shared types and wiring functions of the MultiRing switch.
//
// A MultiRing of 2^n nodes can be configured as 2^i rings of 2^(n-i) nodes,
// i = 0 .. n-1.  Configuration i is selected by the one-hot control bits
// C_0 .. C_(n-1) (C_i = 1).  The switch boxes of the fabric are steered by the
// OR terms C_ij = C_i | C_(i+1) | ... | C_j (i <= j), which are kept in one
// flat vector; cij_index() gives the position of C_ij in it.
//
// The functions below are constant functions used at elaboration time to
// build the fabric wiring:
//   stage_dest   - links into the joining column that builds a 2^(s+1)-node
//                  switch out of two 2^s-node halves (port numbers local to
//                  the group of 2^(s+1) ports)
//   shuffle_node - node that receives fabric output port j (perfect shuffle)
//   box_ctrl_sel - which C_is steers the box in row r of column s
// The formulas follow the published construction; box_ctrl_sel is written
// so that it reproduces the printed 8-node control table (see the fabric).
package mr_pkg;

  // Two implementations of the same 2x2 exchange box: the seven-gate
  // AND/OR form and the six-gate form with two XOR gates.
  typedef enum logic [0:0] {
    SB_AND_OR = 1'b0,
    SB_XOR    = 1'b1
  } sb_impl_e;

  // Number of control inputs C_ij of a 2^n-node switch: n(n+1)/2.
  function automatic int unsigned num_cij(input int unsigned n);
    return n * (n + 1) / 2;
  endfunction

  // Position of C_ij (i <= j) in the flat control vector. The terms are
  // stored row by row: C_00 .. C_0(n-1), C_11 .. C_1(n-1), ..., C_(n-1)(n-1).
  function automatic int unsigned cij_index(input int unsigned n,
                                            input int unsigned i,
                                            input int unsigned j);
    return i * n - (i * (i - 1)) / 2 + (j - i);
  endfunction

  // Output port j of column s-1 is wired to input port stage_dest(j, s) of
  // column s. Column s joins two 2^s-node switches into one 2^(s+1)-node
  // switch; with h = 2^s and l the port number inside that group:
  //   l <  h : l even -> l,  l odd  -> l + h - 1
  //   l >= h : l odd  -> l,  l even -> l - h + 1
  function automatic int unsigned stage_dest(input int unsigned j,
                                             input int unsigned s);
    int unsigned h, base, l, k;
    h    = 1 << s;
    base = j & ~((2 * h) - 1);
    l    = j - base;
    if (l < h) k = (l % 2 == 0) ? l : l + h - 1;
    else       k = (l % 2 == 1) ? l : l - h + 1;
    return base + k;
  endfunction

  // Node P_k that receives output port j of the last column:
  //   j odd -> k = 2^(n-1) + (j-1)/2,  j even -> k = j/2
  function automatic int unsigned shuffle_node(input int unsigned j,
                                               input int unsigned n);
    return (j % 2 == 1) ? (1 << (n - 1)) + (j - 1) / 2 : j / 2;
  endfunction

  // Index i of the control term C_is feeding switch box S_rs.
  // With m = r mod 2^s: m = 0 selects C_0s, otherwise i is the bit length
  // of m, i.e. 2^(i-1) <= m < 2^i.
  function automatic int unsigned box_ctrl_sel(input int unsigned r,
                                               input int unsigned s);
    int unsigned m, i;
    m = r % (1 << s);
    i = 0;
    while (m != 0) begin
      i++;
      m = m >> 1;
    end
    return i;
  endfunction

endpackage
