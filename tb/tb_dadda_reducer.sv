// tb_dadda_reducer - checks the matrix reduction as a plain multiplier and as the
// shared reduction of a two-term multiplier/adder.
//
// Instances and what is checked:
//   m8   8x8 multiplier, standard rule: row0 + row1 == a*b for all 65536 operand
//        pairs; 35 full + 7 half adders in 4 stages.
//   t8   two 8x8 matrices, full-adder-first rule: row0 + row1 == a*b + c*d;
//        97 full + 7 half adders in 6 stages.
//   m12  12x12 multiplier, standard rule: 110 adder modules.
//   t12  two 12x12 matrices, full-adder-first rule: 252 adder modules.
//   k8   two 8x8 matrices plus a constant row: sum == a*b + c*d + K mod 2^17.
// The adder counts are those of the merged and conventional designs being built.
module tb_dadda_reducer;
  localparam logic [16:0] K = 17'h101FF;
  logic [7:0]  a8, b8, c8, d8;
  logic [11:0] a12, b12, c12, d12;
  logic [0:0][7:0][7:0]   pp_m8;
  logic [1:0][7:0][7:0]   pp_t8;
  logic [0:0][11:0][11:0] pp_m12;
  logic [1:0][11:0][11:0] pp_t12;
  logic [15:0] m8_r0, m8_r1;
  logic [16:0] t8_r0, t8_r1, k8_r0, k8_r1;
  logic [23:0] m12_r0, m12_r1;
  logic [24:0] t12_r0, t12_r1;
  int checks = 0, failures = 0;

  always_comb begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        pp_m8[0][i][j] = a8[i] & b8[j];
        pp_t8[0][i][j] = a8[i] & b8[j];
        pp_t8[1][i][j] = c8[i] & d8[j];
      end
    for (int i = 0; i < 12; i++)
      for (int j = 0; j < 12; j++) begin
        pp_m12[0][i][j] = a12[i] & b12[j];
        pp_t12[0][i][j] = a12[i] & b12[j];
        pp_t12[1][i][j] = c12[i] & d12[j];
      end
  end

  dadda_reducer #(.N(8),  .TERMS(1), .W(16), .FA_FIRST(1'b0)) m8  (.pp(pp_m8),  .row0(m8_r0),  .row1(m8_r1));
  dadda_reducer #(.N(8),  .TERMS(2), .W(17), .FA_FIRST(1'b1)) t8  (.pp(pp_t8),  .row0(t8_r0),  .row1(t8_r1));
  dadda_reducer #(.N(12), .TERMS(1), .W(24), .FA_FIRST(1'b0)) m12 (.pp(pp_m12), .row0(m12_r0), .row1(m12_r1));
  dadda_reducer #(.N(12), .TERMS(2), .W(25), .FA_FIRST(1'b1)) t12 (.pp(pp_t12), .row0(t12_r0), .row1(t12_r1));
  dadda_reducer #(.N(8),  .TERMS(2), .W(17), .CONST(K), .FA_FIRST(1'b1)) k8 (.pp(pp_t8), .row0(k8_r0), .row1(k8_r1));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    // Adder counts and stage counts of each reduction.
    expect_int("m8 full adders", m8.NUM_FA, 35);
    expect_int("m8 half adders", m8.NUM_HA, 7);
    expect_int("m8 stages", m8.NUM_STAGES, 4);
    expect_int("t8 full adders", t8.NUM_FA, 97);
    expect_int("t8 half adders", t8.NUM_HA, 7);
    expect_int("t8 stages", t8.NUM_STAGES, 6);
    expect_int("m12 adder modules", m12.NUM_FA + m12.NUM_HA, 110);
    expect_int("t12 adder modules", t12.NUM_FA + t12.NUM_HA, 252);

    // 8x8 multiplier, every operand pair.
    c8 = '0; d8 = '0; a12 = '0; b12 = '0; c12 = '0; d12 = '0;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if (16'(m8_r0 + m8_r1) !== 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL m8 %0d*%0d: %0d", x, y, 16'(m8_r0 + m8_r1));
        end
      end

    // Two-term reductions, random operands plus all-ones.
    for (int t = 0; t < 20000; t++) begin
      logic [16:0] e8;
      logic [24:0] e12;
      if (t == 0) begin
        a8 = '1; b8 = '1; c8 = '1; d8 = '1; a12 = '1; b12 = '1; c12 = '1; d12 = '1;
      end else begin
        {a8, b8, c8, d8} = $urandom;
        a12 = 12'($urandom); b12 = 12'($urandom); c12 = 12'($urandom); d12 = 12'($urandom);
      end
      #1;
      e8  = 17'(a8) * 17'(b8) + 17'(c8) * 17'(d8);
      e12 = 25'(a12) * 25'(b12) + 25'(c12) * 25'(d12);
      checks += 4;
      if (17'(t8_r0 + t8_r1) !== e8) begin
        failures++; $display("FAIL t8 %0d*%0d+%0d*%0d", a8, b8, c8, d8);
      end
      if (17'(k8_r0 + k8_r1) !== 17'(e8 + K)) begin
        failures++; $display("FAIL k8 %0d*%0d+%0d*%0d", a8, b8, c8, d8);
      end
      if (24'(m12_r0 + m12_r1) !== 24'(a12 * b12)) begin
        failures++; $display("FAIL m12 %0d*%0d", a12, b12);
      end
      if (25'(t12_r0 + t12_r1) !== e12) begin
        failures++; $display("FAIL t12 %0d*%0d+%0d*%0d", a12, b12, c12, d12);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
