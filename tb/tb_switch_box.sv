// tb_switch_box: self-checking test of the 2x2 exchange box.
//
// Both gate structures (seven-gate AND/OR and six-gate XOR form) are
// instantiated side by side, 8 bits wide, plus one 1-bit XOR-form box. Every
// 1-bit input combination is applied exhaustively, then random 8-bit words.
// Expected outputs come from the exchange rule itself: C = 0 straight,
// C = 1 crossed.
module tb_switch_box;
  import mr_pkg::*;

  localparam int unsigned W = 8;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] i0, i1, ao0, ao1, xo0, xo1;
  logic         c;
  logic         b0, b1, bc, bo0, bo1;

  switch_box #(.WIDTH(W), .IMPL(SB_AND_OR)) u_andor (
    .i0(i0), .i1(i1), .c(c), .o0(ao0), .o1(ao1));
  switch_box #(.WIDTH(W), .IMPL(SB_XOR)) u_xor (
    .i0(i0), .i1(i1), .c(c), .o0(xo0), .o1(xo1));
  switch_box u_bit (
    .i0(b0), .i1(b1), .c(bc), .o0(bo0), .o1(bo1));

  task automatic check_word(input logic [W-1:0] e0, input logic [W-1:0] e1);
    checks += 2;
    if (ao0 !== e0 || ao1 !== e1) begin
      failures++;
      $display("FAIL and/or box: i0=%h i1=%h c=%0d -> %h %h, expected %h %h",
               i0, i1, c, ao0, ao1, e0, e1);
    end
    if (xo0 !== e0 || xo1 !== e1) begin
      failures++;
      $display("FAIL xor box: i0=%h i1=%h c=%0d -> %h %h, expected %h %h",
               i0, i1, c, xo0, xo1, e0, e1);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Exhaustive 1-bit truth table.
    for (int v = 0; v < 8; v++) begin
      {bc, b1, b0} = 3'(v);
      #1;
      checks++;
      if (bo0 !== (bc ? b1 : b0) || bo1 !== (bc ? b0 : b1)) begin
        failures++;
        $display("FAIL 1-bit box: i0=%0d i1=%0d c=%0d -> o0=%0d o1=%0d", b0, b1, bc, bo0, bo1);
      end
    end
    // Random words, both control values.
    for (int n = 0; n < 200; n++) begin
      i0 = W'($urandom);
      i1 = W'($urandom);
      c  = 1'b0;
      #1 check_word(i0, i1);
      c  = 1'b1;
      #1 check_word(i1, i0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
