// tb_control_unit: self-checking test of the control unit (signal creator
// plus C_ij OR network).
//
// Two instances: the 8-node unit (n = 3) and a 32-node unit (n = 5), each
// with a short dwell time. Every cycle the test checks every control term
// against its definition: for configuration k the one-hot bits give
// C_ij = 1 exactly when i <= k <= j. For n = 3 it also checks the six terms
// against the values listed for the three 8-node configurations
// (C00 C01 C02 C11 C12 C22 = 111000, 011110, 001011). Each configuration
// must be visited, and each must last DWELL cycles.
module tb_control_unit;
  import mr_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // 8-node unit.
  logic [1:0] cfg3;
  logic [2:0] c3;
  logic       first3, last3;
  logic [5:0] cij3;
  control_unit #(.N_LOG(3), .DWELL(4)) dut3 (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .cfg(cfg3), .c(c3),
    .cfg_first(first3), .cfg_last(last3), .cij(cij3));

  // 32-node unit.
  logic [2:0]  cfg5;
  logic [4:0]  c5;
  logic        first5, last5;
  logic [14:0] cij5;
  control_unit #(.N_LOG(5), .DWELL(3)) dut5 (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .cfg(cfg5), .c(c5),
    .cfg_first(first5), .cfg_last(last5), .cij(cij5));

  // Printed 8-node control terms, bit order C00 C01 C02 C11 C12 C22 (MSB first).
  localparam logic [5:0] CIJ8 [3] = '{6'b111000, 6'b011110, 6'b001011};

  int seen3 [3];
  int seen5 [5];

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len3, len5;
    logic [2:0] prev3;
    logic [2:0] prev5;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    len3 = 0; len5 = 0; prev3 = 3'(cfg3); prev5 = cfg5;
    for (int cyc = 0; cyc < 60; cyc++) begin
      @(negedge clk);
      // Definition check, n = 3.
      for (int i = 0; i < 3; i++)
        for (int j = i; j < 3; j++) begin
          checks++;
          if (cij3[cij_index(3, i, j)] !== (i <= int'(cfg3) && int'(cfg3) <= j)) begin
            failures++;
            $display("FAIL n=3 cfg=%0d C%0d%0d=%0d", cfg3, i, j, cij3[cij_index(3, i, j)]);
          end
        end
      // Printed values, n = 3.
      checks++;
      if ({cij3[0], cij3[1], cij3[2], cij3[3], cij3[4], cij3[5]} !== CIJ8[cfg3]) begin
        failures++;
        $display("FAIL n=3 cfg=%0d terms %b, expected %b", cfg3,
                 {cij3[0], cij3[1], cij3[2], cij3[3], cij3[4], cij3[5]}, CIJ8[cfg3]);
      end
      // Definition check, n = 5.
      for (int i = 0; i < 5; i++)
        for (int j = i; j < 5; j++) begin
          checks++;
          if (cij5[cij_index(5, i, j)] !== (i <= int'(cfg5) && int'(cfg5) <= j)) begin
            failures++;
            $display("FAIL n=5 cfg=%0d C%0d%0d=%0d", cfg5, i, j, cij5[cij_index(5, i, j)]);
          end
        end
      checks++;
      if (c5 !== 5'(1 << cfg5) || c3 !== 3'(1 << cfg3)) begin
        failures++;
        $display("FAIL one-hot bits c3=%b c5=%b", c3, c5);
      end
      // Dwell lengths.
      len3++; len5++;
      if (3'(cfg3) != prev3) begin
        checks++;
        if (len3 != 4) begin
          failures++;
          $display("FAIL n=3 configuration %0d lasted %0d cycles", prev3, len3);
        end
        seen3[cfg3]++; len3 = 0; prev3 = 3'(cfg3);
      end
      if (cfg5 != prev5) begin
        checks++;
        if (len5 != 3) begin
          failures++;
          $display("FAIL n=5 configuration %0d lasted %0d cycles", prev5, len5);
        end
        seen5[cfg5]++; len5 = 0; prev5 = cfg5;
      end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (seen3[i] == 0) begin failures++; $display("FAIL n=3 configuration %0d never seen", i); end
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (seen5[i] == 0) begin failures++; $display("FAIL n=5 configuration %0d never seen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
