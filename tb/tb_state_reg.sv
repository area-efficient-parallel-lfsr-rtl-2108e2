// tb_state_reg: self-checking test of the adder and delay register D.
// Drives random feedback and input terms with random enable and
// start-of-message flags and compares the register against a cycle model:
// reset clears it, en low holds it, first drops the feedback term.
module tb_state_reg;
  localparam int unsigned N = 32;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, first = 1'b0;
  logic [N-1:0] fb = '0, inj = '0, xt;
  logic [N-1:0] model;
  int checks = 0, failures = 0;
  int n_hold = 0, n_first = 0, n_update = 0;

  state_reg #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .en(en), .first(first),
                          .fb(fb), .inj(inj), .xt(xt));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (xt != '0) begin failures++; $display("FAIL not cleared by reset"); end
    rst_n = 1'b1;
    model = '0;
    for (int c = 0; c < 1000; c++) begin
      en    = ($urandom_range(0, 3) != 0);
      first = ($urandom_range(0, 4) == 0);
      fb    = N'($urandom());
      inj   = N'($urandom());
      if (!en)        begin model = model;      n_hold++;   end
      else if (first) begin model = inj;        n_first++;  end
      else            begin model = fb ^ inj;   n_update++; end
      @(posedge clk);
      #1;
      checks++;
      if (xt != model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d xt=%h expected %h", c, xt, model);
      end
    end
    checks++;
    if (n_hold == 0 || n_first == 0 || n_update == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
