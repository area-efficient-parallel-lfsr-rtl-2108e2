// tb_crc_table: runs the six CRC configurations of the generator-polynomial
// table (CRC-12, CRC-16, CRC-CCITT, CRC-16 reverse, CCITT reverse, CRC-32),
// each with v = n bits per clock and its published transformation vector.
//
// (1) For each configuration it checks the number of ones of AvT, BvT and T,
// and their total TN, as the package computes them at elaboration, against
// the published counts, and prints the XOR count each matrix needs without
// any sharing of terms.  (2) It builds each configuration both with and
// without the input register and sends random messages through it, checking
// every CRC against a bit-serial CRC register (plfsr_harness).
module tb_crc_table;
  import plfsr_pkg::*;

  localparam int NCFG = 6;
  localparam int NMSG = 60;

  typedef struct {
    string       name;
    int unsigned n;
    logic [63:0] poly, tvec;
    int unsigned ones_avt, ones_bvt, ones_t;
  } cfg_t;

  cfg_t cfg[NCFG] = '{
    '{"CRC-12",         12, 64'h80F,      64'hA01,      29,  25,  23},
    '{"CRC-16",         16, 64'h8005,     64'hC001,     35,  33,  32},
    '{"CRC-CCITT",      16, 64'h1021,     64'h8408,     88,  45,  31},
    '{"CRC-16 reverse", 16, 64'h4003,     64'hC002,    154,  73,  33},
    '{"CCITT reverse",  16, 64'h0811,     64'h8810,     84,  38,  33},
    '{"CRC-32",         32, 64'h04C11DB7, 64'h80000212, 414, 425, 49}
  };

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Harness outputs, index 2*c + (IN_PIPE ? 0 : 1).
  logic done [2*NCFG];
  int   h_checks [2*NCFG], h_fail [2*NCFG], h_stall [2*NCFG], h_b2b [2*NCFG],
        h_single [2*NCFG], h_hold [2*NCFG];

  `define PLFSR_CFG(IDX, NN, P, T) \
    plfsr_harness #(.N(NN), .V(NN), .POLY(NN'(P)), .TVEC(NN'(T)), .IN_PIPE(1), .NMSG(NMSG)) \
      u_p``IDX (.clk(clk), .done(done[2*IDX]), .checks(h_checks[2*IDX]), \
               .failures(h_fail[2*IDX]), .n_stall(h_stall[2*IDX]), .n_b2b(h_b2b[2*IDX]), \
               .n_single(h_single[2*IDX]), .n_idle_hold(h_hold[2*IDX])); \
    plfsr_harness #(.N(NN), .V(NN), .POLY(NN'(P)), .TVEC(NN'(T)), .IN_PIPE(0), .NMSG(NMSG)) \
      u_c``IDX (.clk(clk), .done(done[2*IDX+1]), .checks(h_checks[2*IDX+1]), \
               .failures(h_fail[2*IDX+1]), .n_stall(h_stall[2*IDX+1]), .n_b2b(h_b2b[2*IDX+1]), \
               .n_single(h_single[2*IDX+1]), .n_idle_hold(h_hold[2*IDX+1]));

  `PLFSR_CFG(0, 12, 'h80F,      'hA01)
  `PLFSR_CFG(1, 16, 'h8005,     'hC001)
  `PLFSR_CFG(2, 16, 'h1021,     'h8408)
  `PLFSR_CFG(3, 16, 'h4003,     'hC002)
  `PLFSR_CFG(4, 16, 'h0811,     'h8810)
  `PLFSR_CFG(5, 32, 'h04C11DB7, 'h80000212)

  `undef PLFSR_CFG

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int unsigned got, int unsigned want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin : main
    mat_t avt, bvt, t;
    int unsigned oa, ob, ot;
    bit all_done;
    // (1) matrix cost against the published counts
    foreach (cfg[c]) begin
      avt = avt_matrix(cfg[c].n, cfg[c].n, cfg[c].poly, cfg[c].tvec);
      bvt = bvt_matrix(cfg[c].n, cfg[c].n, cfg[c].poly, cfg[c].tvec);
      t   = t_matrix(cfg[c].n, cfg[c].tvec);
      oa = mat_ones(avt, cfg[c].n, cfg[c].n);
      ob = mat_ones(bvt, cfg[c].n, cfg[c].n);
      ot = mat_ones(t,   cfg[c].n, cfg[c].n);
      expect_eq({cfg[c].name, " ones(AvT)"}, oa, cfg[c].ones_avt);
      expect_eq({cfg[c].name, " ones(BvT)"}, ob, cfg[c].ones_bvt);
      expect_eq({cfg[c].name, " ones(T)"},   ot, cfg[c].ones_t);
      expect_eq({cfg[c].name, " TN"}, oa + ob + ot,
                cfg[c].ones_avt + cfg[c].ones_bvt + cfg[c].ones_t);
      $display("%-15s n=%0d TN=%0d  XOR without sharing: AvT=%0d BvT=%0d T=%0d",
               cfg[c].name, cfg[c].n, oa + ob + ot,
               mat_xor_unshared(avt, cfg[c].n, cfg[c].n),
               mat_xor_unshared(bvt, cfg[c].n, cfg[c].n),
               mat_xor_unshared(t, cfg[c].n, cfg[c].n));
    end
    // (2) wait for every configuration's message run
    do begin
      @(posedge clk);
      all_done = 1;
      foreach (done[i]) all_done &= done[i];
    end while (!all_done);
    foreach (done[i]) begin
      checks   += h_checks[i];
      failures += h_fail[i];
      checks++;
      if (h_stall[i] == 0 || h_b2b[i] == 0 || h_single[i] == 0 || h_hold[i] == 0) begin
        failures++;
        $display("FAIL %s IN_PIPE=%0d: a situation never occurred", cfg[i/2].name, i % 2 == 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
