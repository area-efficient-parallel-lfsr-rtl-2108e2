// tb_avt_unit: self-checking test of the feedback coupling AvT at the CRC-32
// defaults.  (1) Reads the matrix column by column through unit state
// vectors and checks its total number of ones, 414, the published count for
// CRC-32 with vector 0x80000212.  (2) For random states checks
// T*(AvT*xt) = A^v*(T*xt), where A^v is v steps of a serial CRC register fed
// with zeros.
module tb_avt_unit;
  import plfsr_ref_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned V = 32;
  localparam logic [N-1:0] POLY = 32'h04C1_1DB7;
  localparam logic [N-1:0] TVEC = 32'h8000_0212;
  localparam int unsigned ONES_AVT = 414;

  logic [N-1:0] xt;
  logic [N-1:0] y;
  int checks = 0, failures = 0;

  avt_unit #(.N(N), .V(V), .POLY(POLY), .TVEC(TVEC)) dut (.xt(xt), .y(y));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int unsigned ones;
    bit zeros[$];
    word_t x0, expect_x, got_x;
    for (int j = 0; j < V; j++) zeros.push_back(1'b0);
    ones = 0;
    for (int j = 0; j < N; j++) begin
      xt = '0;
      xt[j] = 1'b1;
      #1;
      ones += $countones(y);
    end
    checks++;
    if (ones != ONES_AVT) begin
      failures++;
      $display("FAIL ones(AvT) = %0d, expected %0d", ones, ONES_AVT);
    end
    for (int r = 0; r < 300; r++) begin
      xt = N'(rand_word(N));
      if (r == 0) xt = '1;
      #1;
      x0       = t_mul(N, 64'(TVEC), 64'(xt));
      expect_x = rev(N, serial_crc(N, 64'(POLY), rev(N, x0), zeros));
      got_x    = t_mul(N, 64'(TVEC), 64'(y));
      checks++;
      if (got_x != expect_x) begin
        failures++;
        if (failures < 10) $display("FAIL xt=%h T*y=%h expected %h", xt, got_x, expect_x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
