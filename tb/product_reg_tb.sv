// Self-checking testbench for product_reg (default width, 128 bits).
// Checks the reset values, that the control word is taken every clock,
// that the product loads only with valid control and holds otherwise, and
// the one-cycle delay, against a model kept in the testbench.
module product_reg_tb;
  import mac_pkg::*;

  localparam int unsigned W = 2 * MAC_N;

  logic         clk = 1'b0;
  logic         rst_n;
  mac_ctrl_t    d_ctrl, q_ctrl, m_ctrl;
  logic [W-1:0] d_prod, q_prod, m_prod;
  int checks = 0, failures = 0;
  int n_load = 0, n_hold = 0;

  product_reg dut (
    .clk(clk), .rst_n(rst_n), .d_ctrl(d_ctrl), .d_prod(d_prod),
    .q_ctrl(q_ctrl), .q_prod(q_prod)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n  = 1'b0;
    d_ctrl = '{valid: 1'b1, clr: 1'b1, op: OP_SUB};
    d_prod = '1;
    #12;
    checks++;
    if (q_ctrl !== '0 || q_prod !== '0) begin
      failures++;
      $display("FAIL reset: ctrl=%b prod=%h", q_ctrl, q_prod);
    end
    m_ctrl = '0;
    m_prod = '0;
    d_ctrl = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      d_ctrl = mac_ctrl_t'(3'($urandom_range(0, 7)));
      d_prod = {$urandom(), $urandom(), $urandom(), $urandom()};
      @(posedge clk);
      m_ctrl = d_ctrl;
      if (d_ctrl.valid) begin
        m_prod = d_prod;
        n_load++;
      end else begin
        n_hold++;
      end
      #1;
      checks++;
      if (q_ctrl !== m_ctrl || q_prod !== m_prod) begin
        failures++;
        $display("FAIL cycle %0d: ctrl=%b prod=%h, expected ctrl=%b prod=%h",
                 n, q_ctrl, q_prod, m_ctrl, m_prod);
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
