// tb_t_unit: self-checking test of the output transformation T at the CRC-32
// defaults.  Checks the total number of ones of T, 49 for vector 0x80000212,
// that the last column of T is the vector itself read bottom-up, and that
// random transformed states map to the product worked out diagonal by
// diagonal.
module tb_t_unit;
  import plfsr_ref_pkg::*;

  localparam int unsigned N = 32;
  localparam logic [N-1:0] TVEC = 32'h8000_0212;
  localparam int unsigned ONES_T = 49;

  logic [N-1:0] xt;
  logic [N-1:0] x;
  int checks = 0, failures = 0;

  t_unit #(.N(N), .TVEC(TVEC)) dut (.xt(xt), .x(x));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int unsigned ones;
    ones = 0;
    for (int j = 0; j < N; j++) begin
      xt = '0;
      xt[j] = 1'b1;
      #1;
      ones += $countones(x);
      if (j == N - 1) begin
        // column n-1 holds v_{n-1-i} in row i: element i is TVEC bit i
        checks++;
        if (x != TVEC) begin
          failures++;
          $display("FAIL last column %h, expected %h", x, TVEC);
        end
      end
    end
    checks++;
    if (ones != ONES_T) begin
      failures++;
      $display("FAIL ones(T) = %0d, expected %0d", ones, ONES_T);
    end
    for (int r = 0; r < 300; r++) begin
      xt = N'(rand_word(N));
      #1;
      checks++;
      if (64'(x) != t_mul(N, 64'(TVEC), 64'(xt))) begin
        failures++;
        if (failures < 10) $display("FAIL xt=%h x=%h", xt, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
