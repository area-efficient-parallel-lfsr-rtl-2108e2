// plfsr_harness: random-message driver and checker around one parallel_lfsr
// configuration, for testbenches that compare several configurations.
//
// Sends NMSG random messages of 1 to 12 blocks, with idle cycles before some
// messages, stalls inside some and others back to back, and compares each
// CRC with a bit-serial CRC register fed the same bits.  It checks that the
// CRC is flagged exactly LAT clocks after the last block (LAT = 2 with the
// input register, 1 without), that a message of k blocks with g stall
// cycles is flagged k+g+LAT-1 clocks after its first block, and that the CRC
// holds while idle.  Raises done when finished; counts are on its outputs.
module plfsr_harness #(
  parameter int unsigned N       = 32,
  parameter int unsigned V       = N,
  parameter logic [N-1:0] POLY   = 32'h04C1_1DB7,
  parameter logic [N-1:0] TVEC   = 32'h8000_0212,
  parameter bit           IN_PIPE = 1'b1,
  parameter int           NMSG   = 100
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_b2b,
  output int   n_single,
  output int   n_idle_hold
);
  import plfsr_ref_pkg::*;

  localparam int LAT = IN_PIPE ? 2 : 1;

  typedef struct {
    bit    v, l;
    word_t crc;
    int    first_cyc, nclk;
  } step_t;

  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  logic [V-1:0] in_data = '0;
  logic [N-1:0] crc;
  logic crc_valid;

  parallel_lfsr #(.N(N), .V(V), .POLY(POLY), .TVEC(TVEC), .IN_PIPE(IN_PIPE)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
    .in_last(in_last), .in_data(in_data), .crc(crc), .crc_valid(crc_valid)
  );

  step_t hist[$];
  word_t held_crc;
  bit    have_held = 0;
  int    cyc = 0;

  task automatic fail(string what);
    failures++;
    if (failures < 10) $display("FAIL N=%0d IN_PIPE=%0d @%0t: %s", N, IN_PIPE, $time, what);
  endtask

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
    done = 0; checks = 0; failures = 0;
    n_stall = 0; n_b2b = 0; n_single = 0; n_idle_hold = 0;
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
        for (int j = int'(V) - 1; j >= 0; j--) msg.push_back(blocks[b][j]);
      end
      exp_crc = serial_crc(N, 64'(POLY), '0, msg);
      if (nblk == 1) n_single++;
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
    done = 1;
  end
endmodule
