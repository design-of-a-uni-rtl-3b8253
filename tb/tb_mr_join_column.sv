// tb_mr_join_column: self-checking test of the column that joins two
// half-size switches.
//
// 16-node column (n = 4, the column added when two 8-node switches are
// combined) and 8-node column (n = 3), 8-bit links. The expected links are
// written out as tables: incoming port j reaches box input port
//   n = 4: 0 8 2 10 4 12 6 14 1 9 3 11 5 13 7 15
//   n = 3: 0 4 2 6 1 5 3 7
// and the expected control term of each box row (index i of C_i(n-1)) as
//   n = 4: 0 1 2 2 3 3 3 3
//   n = 3: 0 1 2 2
// The test applies all-zero controls and then each single control term, with
// a distinct token on every incoming port, and checks every output port and
// every box control bit.
module tb_mr_join_column;

  int checks = 0;
  int failures = 0;

  localparam int K16 [16] = '{0, 8, 2, 10, 4, 12, 6, 14, 1, 9, 3, 11, 5, 13, 7, 15};
  localparam int R16 [8]  = '{0, 1, 2, 2, 3, 3, 3, 3};
  localparam int K8  [8]  = '{0, 4, 2, 6, 1, 5, 3, 7};
  localparam int R8  [4]  = '{0, 1, 2, 2};

  logic [15:0][7:0] in16, out16;
  logic [3:0]       c16;
  logic [7:0]       bc16;
  logic [7:0][7:0]  in8, out8;
  logic [2:0]       c8;
  logic [3:0]       bc8;

  mr_join_column #(.N_LOG(4), .WIDTH(8)) dut16 (
    .in_port(in16), .c_col(c16), .out_port(out16), .box_c(bc16));
  mr_join_column #(.N_LOG(3), .WIDTH(8)) dut8 (
    .in_port(in8), .c_col(c8), .out_port(out8), .box_c(bc8));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Case -1: all controls 0; case i: only C_i(n-1) set.
    for (int cs = -1; cs < 4; cs++) begin
      for (int j = 0; j < 16; j++) in16[j] = 8'(8'h40 + j);
      for (int j = 0; j < 8; j++)  in8[j]  = 8'(8'h80 + j);
      c16 = (cs >= 0) ? 4'(1 << cs) : 4'b0;
      c8  = (cs >= 0 && cs < 3) ? 3'(1 << cs) : 3'b0;
      #1;
      // 16 ports.
      for (int r = 0; r < 8; r++) begin
        logic cr;
        cr = (R16[r] == cs);
        checks++;
        if (bc16[r] !== cr) begin
          failures++;
          $display("FAIL n=4 case %0d: box %0d control %0d, expected %0d", cs, r, bc16[r], cr);
        end
        for (int b = 0; b < 2; b++) begin
          int kin, src;
          kin = 2 * r + (b ^ int'(cr));   // box input that reaches output 2r+b
          src = -1;
          for (int j = 0; j < 16; j++) if (K16[j] == kin) src = j;
          checks++;
          if (out16[2*r+b] !== 8'(8'h40 + src)) begin
            failures++;
            $display("FAIL n=4 case %0d: output %0d carries %h, expected port %0d", cs, 2*r+b, out16[2*r+b], src);
          end
        end
      end
      // 8 ports.
      if (cs < 3) begin
        for (int r = 0; r < 4; r++) begin
          logic cr;
          cr = (R8[r] == cs);
          checks++;
          if (bc8[r] !== cr) begin
            failures++;
            $display("FAIL n=3 case %0d: box %0d control %0d, expected %0d", cs, r, bc8[r], cr);
          end
          for (int b = 0; b < 2; b++) begin
            int kin, src;
            kin = 2 * r + (b ^ int'(cr));
            src = -1;
            for (int j = 0; j < 8; j++) if (K8[j] == kin) src = j;
            checks++;
            if (out8[2*r+b] !== 8'(8'h80 + src)) begin
              failures++;
              $display("FAIL n=3 case %0d: output %0d carries %h, expected port %0d", cs, 2*r+b, out8[2*r+b], src);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
