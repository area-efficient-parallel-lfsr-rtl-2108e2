// tb_bvt_unit: self-checking test of the input coupling BvT at the CRC-32
// defaults.  (1) Applies each unit input vector to read the matrix column by
// column and checks its total number of ones, 425, the count published for
// CRC-32 with vector 0x80000212.  (2) For random blocks U checks
// T*(BvT*U) = Bv*U, where Bv*U is the state a serial CRC register reaches
// from zero after taking the v bits of U one by one.
module tb_bvt_unit;
  import plfsr_ref_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned V = 32;
  localparam logic [N-1:0] POLY = 32'h04C1_1DB7;
  localparam logic [N-1:0] TVEC = 32'h8000_0212;
  localparam int unsigned ONES_BVT = 425;

  logic [V-1:0] u;
  logic [N-1:0] y;
  int checks = 0, failures = 0;

  bvt_unit #(.N(N), .V(V), .POLY(POLY), .TVEC(TVEC)) dut (.u(u), .y(y));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int unsigned ones;
    bit msg[$];
    word_t expect_x, got_x;
    ones = 0;
    for (int j = 0; j < V; j++) begin
      u = '0;
      u[j] = 1'b1;
      #1;
      ones += $countones(y);
    end
    checks++;
    if (ones != ONES_BVT) begin
      failures++;
      $display("FAIL ones(BvT) = %0d, expected %0d", ones, ONES_BVT);
    end
    for (int r = 0; r < 300; r++) begin
      u = V'(rand_word(V));
      if (r == 0) u = '0;
      if (r == 1) u = '1;
      #1;
      msg.delete();
      for (int j = 0; j < V; j++) msg.push_back(u[j]);
      expect_x = rev(N, serial_crc(N, 64'(POLY), '0, msg));
      got_x    = t_mul(N, 64'(TVEC), 64'(y));
      checks++;
      if (got_x != expect_x) begin
        failures++;
        if (failures < 10) $display("FAIL u=%h T*y=%h expected %h", u, got_x, expect_x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
