// Self-checking testbench for accumulator (default width, 128 bits).
// Checks reset to zero, load with en, hold without it and the q_valid flag
// one cycle after each load, against a model kept in the testbench.
module accumulator_tb;
  localparam int unsigned W = 128;

  logic         clk = 1'b0;
  logic         rst_n, en, q_valid, m_valid;
  logic [W-1:0] d, q, m_q;
  int checks = 0, failures = 0;
  int n_load = 0, n_hold = 0;

  accumulator dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q), .q_valid(q_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    en    = 1'b1;
    d     = '1;
    #12;
    checks++;
    if (q !== '0 || q_valid !== 1'b0) begin
      failures++;
      $display("FAIL reset: q=%h valid=%b", q, q_valid);
    end
    m_q = '0;
    en  = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      en = 1'($urandom());
      d  = {$urandom(), $urandom(), $urandom(), $urandom()};
      @(posedge clk);
      m_valid = en;
      if (en) begin
        m_q = d;
        n_load++;
      end else begin
        n_hold++;
      end
      #1;
      checks++;
      if (q !== m_q || q_valid !== m_valid) begin
        failures++;
        $display("FAIL cycle %0d: q=%h valid=%b, expected %h %b", n, q, q_valid, m_q, m_valid);
      end
    end
    checks++;
    if (n_load == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL load=%0d hold=%0d", n_load, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
