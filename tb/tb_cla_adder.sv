// tb_cla_adder - checks the two-level carry lookahead adder against a + b + cin at
// three shapes: 16 bits in 5-bit blocks (short top block), 15 bits in 5-bit blocks,
// and 24 bits in 4-bit blocks. Corner cases (all ones, carry through every block)
// come first, then random operands.
module tb_cla_adder;
  logic [15:0] a16, b16, s16;
  logic [14:0] a15, b15, s15;
  logic [23:0] a24, b24, s24;
  logic        cin, c16, c15, c24;
  int checks = 0, failures = 0;

  cla_adder #(.WIDTH(16), .BLK(5)) dut16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(c16));
  cla_adder #(.WIDTH(15), .BLK(5)) dut15 (.a(a15), .b(b15), .cin(cin), .sum(s15), .cout(c15));
  cla_adder #(.WIDTH(24), .BLK(4)) dut24 (.a(a24), .b(b24), .cin(cin), .sum(s24), .cout(c24));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check;
    logic [16:0] e16;
    logic [15:0] e15;
    logic [24:0] e24;
    #1;
    e16 = 17'(a16) + 17'(b16) + 17'(cin);
    e15 = 16'(a15) + 16'(b15) + 16'(cin);
    e24 = 25'(a24) + 25'(b24) + 25'(cin);
    checks += 3;
    if ({c16, s16} !== e16) begin failures++; $display("FAIL16 %h+%h+%0d=%h", a16, b16, cin, {c16, s16}); end
    if ({c15, s15} !== e15) begin failures++; $display("FAIL15 %h+%h+%0d=%h", a15, b15, cin, {c15, s15}); end
    if ({c24, s24} !== e24) begin failures++; $display("FAIL24 %h+%h+%0d=%h", a24, b24, cin, {c24, s24}); end
  endtask

  initial begin
    a16 = '1; b16 = '0; a15 = '1; b15 = '0; a24 = '1; b24 = '0; cin = 1'b1; check();
    a16 = '1; b16 = '1; a15 = '1; b15 = '1; a24 = '1; b24 = '1; cin = 1'b1; check();
    a16 = '0; b16 = '0; a15 = '0; b15 = '0; a24 = '0; b24 = '0; cin = 1'b0; check();
    for (int t = 0; t < 5000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      a15 = 15'($urandom); b15 = 15'($urandom);
      a24 = 24'($urandom); b24 = 24'($urandom);
      cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
