// tb_merged_complex_multiplier_12bit - end-to-end test of the complex multiplier with
// 12-bit operands, the size of the larger gate-count comparison.
//
// Streams random complex operand pairs with random idle cycles and a reset in the
// middle, and compares every result with P real = Xr*Yr - Xi*Yi and
// P imag = Xr*Yi + Xi*Yr computed here. Each result must appear exactly two
// clock cycles after its operands, one result per clock when operands arrive
// back to back, and no result may appear that was not requested.
// Events counted, each of which must happen at least once: back-to-back operands
// (full rate), idle cycles, a negative P real, a zero P real, a P imag that needs
// its top bit (sum above 2^(2N)-1), the all-ones operands, and a reset that drops
// operands already in flight.
module tb_merged_complex_multiplier_12bit;
  localparam int N = 12;
  localparam int LATENCY = 2;
  localparam int NOPS = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [N-1:0] x_re = '0, x_im = '0, y_re = '0, y_im = '0;
  logic out_valid;
  logic signed [2*N:0] p_re;
  logic [2*N:0] p_im;

  merged_complex_multiplier #(.N(N)) dut (
    .clk, .rst_n, .in_valid, .x_re, .x_im, .y_re, .y_im, .out_valid, .p_re, .p_im
  );

  typedef struct {
    longint re;
    longint im;
    longint due;
  } expect_t;

  expect_t exp_q[$];
  longint  cycle = 0;
  int checks = 0, failures = 0, issued = 0;
  int n_b2b = 0, n_idle = 0, n_neg = 0, n_zero = 0, n_topbit = 0, n_ones = 0, n_reset = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (NOPS * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: compare on every clock edge.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result at cycle %0d", cycle);
      end else begin
        expect_t e;
        e = exp_q.pop_front();
        if (e.due != cycle || longint'(p_re) != e.re || longint'(p_im) != e.im) begin
          failures++;
          $display("FAIL cycle %0d (due %0d): re %0d/%0d im %0d/%0d",
                   cycle, e.due, p_re, e.re, p_im, e.im);
        end
      end
    end else if (rst_n && exp_q.size() != 0 && exp_q[0].due <= cycle) begin
      checks++;
      failures++;
      $display("FAIL missing result due at cycle %0d", exp_q[0].due);
      void'(exp_q.pop_front());
    end
  end

  task automatic drive(bit v, logic [N-1:0] xr, logic [N-1:0] xi, logic [N-1:0] yr,
                       logic [N-1:0] yi);
    expect_t e;
    in_valid <= v;
    x_re <= xr; x_im <= xi; y_re <= yr; y_im <= yi;
    if (v) begin
      e.re  = longint'(xr) * yr - longint'(xi) * yi;
      e.im  = longint'(xr) * yi + longint'(xi) * yr;
      e.due = cycle + LATENCY;
      exp_q.push_back(e);
      issued++;
      if (e.re < 0) n_neg++;
      if (e.re == 0) n_zero++;
      if (e.im >= (longint'(1) << (2 * N))) n_topbit++;
      if (&{xr, xi, yr, yi}) n_ones++;
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    logic prev_v;
    bit   v;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    prev_v = 1'b0;
    for (int t = 0; t < NOPS; t++) begin
      logic [N-1:0] xr, xi, yr, yi;
      if (t == NOPS / 2) begin
        // Reset with operands in flight: they must never appear.
        drive(1'b1, N'($urandom), N'($urandom), N'($urandom), N'($urandom));
        rst_n = 1'b0;
        exp_q.delete();
        n_reset++;
        @(posedge clk);
        #1 rst_n = 1'b1;
        in_valid = 1'b0;
        prev_v = 1'b0;
      end
      xr = N'($urandom); xi = N'($urandom); yr = N'($urandom); yi = N'($urandom);
      case (t % 97)
        0: begin xr = '1; xi = '1; yr = '1; yi = '1; end
        1: begin xi = xr; yi = yr; end               // zero real part
        2: begin xr = '0; yi = '1; end               // negative real part
        default: ;
      endcase
      v = ($urandom % 4) != 0;
      if (v && prev_v) n_b2b++;
      if (!v) n_idle++;
      drive(v, xr, xi, yr, yi);
      prev_v = v;
    end
    in_valid <= 1'b0;
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_q.size());
    end
    $display("issued=%0d back_to_back=%0d idle=%0d negative_re=%0d zero_re=%0d im_top_bit=%0d all_ones=%0d reset=%0d",
             issued, n_b2b, n_idle, n_neg, n_zero, n_topbit, n_ones, n_reset);
    checks += 7;
    if (n_b2b == 0)    begin failures++; $display("FAIL no back-to-back operands"); end
    if (n_idle == 0)   begin failures++; $display("FAIL no idle cycle"); end
    if (n_neg == 0)    begin failures++; $display("FAIL no negative real part"); end
    if (n_zero == 0)   begin failures++; $display("FAIL no zero real part"); end
    if (n_topbit == 0) begin failures++; $display("FAIL imaginary part never used its top bit"); end
    if (n_ones == 0)   begin failures++; $display("FAIL all-ones operands never applied"); end
    if (n_reset == 0)  begin failures++; $display("FAIL no reset in flight"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
