// tb_bit_product_array - checks the AND array and its NAND variant bit by bit
// against a[i] & b[j], and checks that the inverted array's bits, summed at their
// weights 2^(i+j), equal (2^N-1)^2 - a*b.
module tb_bit_product_array;
  localparam int N = 8;
  logic [N-1:0] a, b;
  logic [N-1:0][N-1:0] pp_and, pp_nand;
  int checks = 0, failures = 0;

  bit_product_array #(.N(N)) dut (.a(a), .b(b), .pp(pp_and));
  bit_product_array #(.N(N), .INVERT(1'b1)) dut_inv (.a(a), .b(b), .pp(pp_nand));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      longint wsum;
      if (t == 0) begin a = '1; b = '1; end
      else if (t == 1) begin a = '0; b = '1; end
      else begin a = N'($urandom); b = N'($urandom); end
      #1;
      wsum = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          checks++;
          if (pp_and[i][j] !== (a[i] & b[j]) || pp_nand[i][j] !== ~(a[i] & b[j])) begin
            failures++;
            $display("FAIL a=%h b=%h i=%0d j=%0d", a, b, i, j);
          end
          if (pp_nand[i][j]) wsum += longint'(1) << (i + j);
        end
      checks++;
      if (wsum != longint'((1 << N) - 1) * ((1 << N) - 1) - longint'(a) * longint'(b)) begin
        failures++;
        $display("FAIL inverted weighted sum a=%h b=%h sum=%0d", a, b, wsum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
