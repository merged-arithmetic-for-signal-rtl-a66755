// tb_two_term_mult_adder - checks the merged two-term multiplier/adder in both
// forms and at two sizes against products computed in the testbench:
//   add8 / sub8    N = 8:  p == xa*ya + xb*yb, and p == xa*ya - xb*yb (signed)
//   add12 / sub12  N = 12: the same
// Corner operands (all zeros, all ones, one product zero) come first, then random
// ones. It also checks the adder network of the 8-bit adding form: 97 full and
// 7 half adders in six stages.
module tb_two_term_mult_adder;
  logic [7:0]  xa8, ya8, xb8, yb8;
  logic [11:0] xa12, ya12, xb12, yb12;
  logic [16:0] add8, sub8;
  logic [24:0] add12, sub12;
  int checks = 0, failures = 0;

  two_term_mult_adder #(.N(8))                    u_add8  (.xa(xa8), .ya(ya8), .xb(xb8), .yb(yb8), .p(add8));
  two_term_mult_adder #(.N(8),  .SUBTRACT(1'b1))  u_sub8  (.xa(xa8), .ya(ya8), .xb(xb8), .yb(yb8), .p(sub8));
  two_term_mult_adder #(.N(12))                   u_add12 (.xa(xa12), .ya(ya12), .xb(xb12), .yb(yb12), .p(add12));
  two_term_mult_adder #(.N(12), .SUBTRACT(1'b1))  u_sub12 (.xa(xa12), .ya(ya12), .xb(xb12), .yb(yb12), .p(sub12));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks += 3;
    if (u_add8.u_red.NUM_FA != 97) begin failures++; $display("FAIL full adders %0d", u_add8.u_red.NUM_FA); end
    if (u_add8.u_red.NUM_HA != 7)  begin failures++; $display("FAIL half adders %0d", u_add8.u_red.NUM_HA); end
    if (u_add8.u_red.NUM_STAGES != 6) begin failures++; $display("FAIL stages %0d", u_add8.u_red.NUM_STAGES); end

    for (int t = 0; t < 20000; t++) begin
      longint e_add8, e_sub8, e_add12, e_sub12;
      case (t)
        0: begin {xa8, ya8, xb8, yb8} = '0; {xa12, ya12, xb12, yb12} = '0; end
        1: begin {xa8, ya8, xb8, yb8} = '1; {xa12, ya12, xb12, yb12} = '1; end
        2: begin xa8 = 0; ya8 = '1; xb8 = '1; yb8 = '1; xa12 = 0; ya12 = '1; xb12 = '1; yb12 = '1; end
        3: begin xa8 = '1; ya8 = '1; xb8 = 0; yb8 = '1; xa12 = '1; ya12 = '1; xb12 = 0; yb12 = '1; end
        default: begin
          {xa8, ya8, xb8, yb8} = $urandom;
          xa12 = 12'($urandom); ya12 = 12'($urandom); xb12 = 12'($urandom); yb12 = 12'($urandom);
        end
      endcase
      #1;
      e_add8  = longint'(xa8) * ya8 + longint'(xb8) * yb8;
      e_sub8  = longint'(xa8) * ya8 - longint'(xb8) * yb8;
      e_add12 = longint'(xa12) * ya12 + longint'(xb12) * yb12;
      e_sub12 = longint'(xa12) * ya12 - longint'(xb12) * yb12;
      checks += 4;
      if (longint'(add8) != e_add8) begin
        failures++; $display("FAIL add8 %0d*%0d+%0d*%0d = %0d", xa8, ya8, xb8, yb8, add8);
      end
      if (longint'($signed(sub8)) != e_sub8) begin
        failures++; $display("FAIL sub8 %0d*%0d-%0d*%0d = %0d", xa8, ya8, xb8, yb8, $signed(sub8));
      end
      if (longint'(add12) != e_add12) begin
        failures++; $display("FAIL add12 %0d*%0d+%0d*%0d = %0d", xa12, ya12, xb12, yb12, add12);
      end
      if (longint'($signed(sub12)) != e_sub12) begin
        failures++; $display("FAIL sub12 %0d*%0d-%0d*%0d = %0d", xa12, ya12, xb12, yb12, $signed(sub12));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
