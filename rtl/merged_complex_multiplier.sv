// merged_complex_multiplier - complex multiplier built from two merged two-term
// multiplier/adders.
//
//   P real = X real * Y real - X imag * Y imag
//   P imag = X real * Y imag + X imag * Y real
//
// Each part is one two_term_mult_adder: both of its bit-product matrices share one
// reduction network and one carry lookahead adder, so the whole multiplier needs
// two lookahead adders instead of the six of four separate multipliers and two
// adders. Operands are unsigned N-bit numbers; P imag is an unsigned 2N+1-bit
// number and P real a 2N+1-bit two's complement number (it is negative when
// X imag * Y imag is the larger product).
//
// The arithmetic follows the merged design; the clocking is this design's own
// choice. Operands are captured in an input register when in_valid is high, the
// merged arithmetic runs in the following cycle, and the result is captured in an
// output register, so out_valid and the products appear two clock cycles after
// in_valid and the operands, one new product per clock. rst_n is an active-low
// synchronous reset that clears both valid bits and the registers.
module merged_complex_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N-1:0]        x_re,
  input  logic [N-1:0]        x_im,
  input  logic [N-1:0]        y_re,
  input  logic [N-1:0]        y_im,
  output logic                out_valid,
  output logic signed [2*N:0] p_re,
  output logic [2*N:0]        p_im
);
  logic         v_q;
  logic [N-1:0] xr_q, xi_q, yr_q, yi_q;
  logic [2*N:0] re_d, im_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q  <= 1'b0;
      xr_q <= '0;
      xi_q <= '0;
      yr_q <= '0;
      yi_q <= '0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        xr_q <= x_re;
        xi_q <= x_im;
        yr_q <= y_re;
        yi_q <= y_im;
      end
    end
  end

  two_term_mult_adder #(.N(N), .SUBTRACT(1'b1)) u_real (
    .xa (xr_q), .ya (yr_q), .xb (xi_q), .yb (yi_q), .p (re_d)
  );

  two_term_mult_adder #(.N(N), .SUBTRACT(1'b0)) u_imag (
    .xa (xr_q), .ya (yi_q), .xb (xi_q), .yb (yr_q), .p (im_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p_re      <= '0;
      p_im      <= '0;
    end else begin
      out_valid <= v_q;
      if (v_q) begin
        p_re <= re_d;
        p_im <= im_d;
      end
    end
  end
endmodule
