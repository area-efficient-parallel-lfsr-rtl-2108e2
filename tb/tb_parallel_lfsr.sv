// tb_parallel_lfsr: end-to-end test of the parallel CRC generator at its
// default parameters (CRC-32, 32 bits per clock, vector 0x80000212, input
// term registered).
//
// Sends random messages of 1 to 12 blocks and compares every CRC with a
// bit-serial CRC register fed the same bits.  Messages are sent with idle
// cycles between their blocks (stalls), back to back (a first block on the
// clock after a last block) and as single blocks.  Also checked: the CRC is
// flagged exactly 2 clocks after the last block, a message of k blocks with
// g stall cycles is flagged k+g+1 clocks after its first block (one clock
// per 32-bit block), and the CRC holds while idle.  Each situation is
// counted and must occur at least once.
module tb_parallel_lfsr;
  import plfsr_ref_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned V = 32;
  localparam logic [63:0] POLY = 64'h04C1_1DB7;
  localparam int LAT  = 2;     // clocks from last block to crc_valid
  localparam int NMSG = 400;

  typedef struct {
    bit    v, l;
    word_t crc;
    int    first_cyc, nclk;
  } step_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  logic [V-1:0] in_data = '0;
  logic [N-1:0] crc;
  logic crc_valid;

  int checks = 0, failures = 0;
  int n_stall = 0, n_b2b = 0, n_single = 0, n_multi = 0, n_idle_hold = 0;

  parallel_lfsr dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
    .in_last(in_last), .in_data(in_data), .crc(crc), .crc_valid(crc_valid)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, what);
  endtask

  step_t hist[$];       // what was applied on each clock, oldest first
  word_t held_crc;      // last flagged CRC, must hold while idle
  bit    have_held = 0;
  int    cyc = 0;       // clock count

  // Apply one clock's inputs at a falling edge, let the rising edge take
  // them, and at the next falling edge check the outputs against the step
  // applied LAT-1 clocks earlier.
  task automatic step(step_t s, bit f, logic [V-1:0] d);
    step_t e;
    in_valid = s.v; in_first = f; in_last = s.l; in_data = d;
    hist.push_back(s);
    @(negedge clk);
    cyc++;
    if (hist.size() < LAT) return;
    e = hist.pop_front();
    checks++;
    if (crc_valid !== (e.v && e.l)) fail($sformatf("crc_valid=%0b expected %0b", crc_valid, e.v && e.l));
    if (e.v && e.l) begin
      checks += 2;
      if (64'(crc) != e.crc) fail($sformatf("crc=%h expected %h", crc, e.crc[N-1:0]));
      if (cyc - e.first_cyc != e.nclk + LAT - 1)
        fail($sformatf("CRC after %0d clocks, expected %0d", cyc - e.first_cyc, e.nclk + LAT - 1));
      held_crc = 64'(crc);
    end else if (!e.v && have_held) begin
      checks++;
      n_idle_hold++;
      if (64'(crc) != held_crc) fail("crc changed while idle");
    end
    if (e.v) have_held = e.v && e.l;
  endtask

  task automatic idle();
    step_t s;
    s = '{v: 0, l: 0, crc: '0, first_cyc: 0, nclk: 0};
    step(s, 0, V'(rand_word(V)));
  endtask

  initial begin : main
    bit msg[$];
    logic [V-1:0] blocks[$];
    int nblk, gaps, first_cyc;
    word_t exp_crc;
    step_t s;
    bit prev_was_last;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    prev_was_last = 0;
    for (int k = 0; k < NMSG; k++) begin
      nblk = (k % 5 == 0) ? 1 : $urandom_range(2, 12);
      blocks.delete();
      msg.delete();
      for (int b = 0; b < nblk; b++) begin
        blocks.push_back(V'(rand_word(V)));
        for (int j = V - 1; j >= 0; j--) msg.push_back(blocks[b][j]);
      end
      exp_crc = serial_crc(N, POLY, '0, msg);
      if (nblk == 1) n_single++; else n_multi++;
      // idle cycles before the message, unless sent back to back
      if (prev_was_last && $urandom_range(0, 1) == 0) n_b2b++;
      else repeat ($urandom_range(1, 3)) idle();
      gaps = 0;
      first_cyc = cyc;
      for (int b = 0; b < nblk; b++) begin
        if (b > 0 && k % 3 == 1 && $urandom_range(0, 2) == 0) begin
          repeat ($urandom_range(1, 2)) begin
            idle();
            gaps++;
          end
          n_stall++;
        end
        s = '{v: 1, l: (b == nblk - 1), crc: exp_crc, first_cyc: first_cyc, nclk: nblk + gaps};
        step(s, b == 0, blocks[b]);
      end
      prev_was_last = 1;
    end
    repeat (4) idle();
    $display("stalls=%0d back_to_back=%0d single_block=%0d multi_block=%0d idle_holds=%0d",
             n_stall, n_b2b, n_single, n_multi, n_idle_hold);
    checks++;
    if (n_stall == 0 || n_b2b == 0 || n_single == 0 || n_multi == 0 || n_idle_hold == 0)
      fail("a situation never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
