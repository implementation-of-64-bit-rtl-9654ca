// End-to-end testbench for mac_top at its default size (64-bit operands,
// 128-bit accumulator); it leaves every parameter of the unit alone.
//
// Phases:
//   1. latency: one operation with clear, sampled at clock edge t; acc must
//      hold the product after edge t+1, with acc_valid in that cycle only;
//   2. a directed dot product, sum of x_i * y_i for x = 1..8, y = 9..16,
//      issued back to back (expected 492), then a subtraction of 7*7;
//   3. a 32 x 32 run: 500 operations whose operands fit in 32 bits;
//   4. 20000 random cycles mixing add, subtract, clear with and without an
//      operation, idle cycles and a reset in the middle.
// Every cycle acc and acc_valid are compared with a cycle-accurate model
// that uses the simulator's own 128-bit arithmetic. Each mechanism
// (add, subtract, clear with an operation, clear alone, idle cycle,
// back-to-back issue, wrap-around above 2^128 and below 0, reset during
// operation) is counted; one that never happened is a failure.
module mac_top_tb;
  localparam int unsigned N = 64;
  localparam int unsigned W = 2 * N;

  logic           clk = 1'b0;
  logic           rst_n, in_valid, sub, clr, acc_valid;
  logic [N-1:0]   x, y;
  logic [W-1:0]   acc;

  // Model state: the operation in the product register and the accumulator.
  logic           m_pv, m_psub, m_pclr;
  logic [W-1:0]   m_pprod, m_acc;
  logic           m_valid;
  logic           prev_issue;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_clr_op = 0, n_clr_only = 0, n_idle = 0;
  int n_b2b = 0, n_wrap_up = 0, n_wrap_down = 0, n_reset = 0, n_narrow = 0;

  mac_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
    .sub(sub), .clr(clr), .acc(acc), .acc_valid(acc_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_reset();
    m_pv = 1'b0; m_psub = 1'b0; m_pclr = 1'b0; m_pprod = '0;
    m_acc = '0; m_valid = 1'b0; prev_issue = 1'b0;
  endtask

  // Advance the model by one clock edge, with the inputs now applied.
  task automatic model_step();
    logic [W-1:0] base;
    logic [W:0]   wide;
    if (m_pv || m_pclr) begin
      base = m_pclr ? '0 : m_acc;
      if (m_pv) begin
        wide = m_psub ? ({1'b0, base} - {1'b0, m_pprod}) : ({1'b0, base} + {1'b0, m_pprod});
        if (wide[W] && !m_psub) n_wrap_up++;
        if (wide[W] &&  m_psub) n_wrap_down++;
        m_acc = wide[W-1:0];
      end else begin
        m_acc = base;
      end
      m_valid = 1'b1;
    end else begin
      m_valid = 1'b0;
    end
    m_pv   = in_valid;
    m_psub = sub;
    m_pclr = clr;
    if (in_valid) m_pprod = W'(x) * W'(y);
    // Mechanism counts, at issue.
    if (in_valid && !sub) n_add++;
    if (in_valid &&  sub) n_sub++;
    if (in_valid &&  clr) n_clr_op++;
    if (!in_valid && clr) n_clr_only++;
    if (!in_valid && !clr) n_idle++;
    if (in_valid && prev_issue) n_b2b++;
    prev_issue = in_valid;
  endtask

  task automatic compare(string what);
    checks++;
    if (acc !== m_acc || acc_valid !== m_valid) begin
      failures++;
      $display("FAIL %s at %0t: acc=%h valid=%b, expected %h %b",
               what, $time, acc, acc_valid, m_acc, m_valid);
    end
  endtask

  // Apply inputs at the falling edge, step the model at the rising edge and
  // compare just after it.
  task automatic cycle(logic v, logic s, logic c, logic [N-1:0] xv, logic [N-1:0] yv,
                       string what);
    @(negedge clk);
    in_valid = v; sub = s; clr = c; x = xv; y = yv;
    @(posedge clk);
    model_step();
    #1;
    compare(what);
  endtask

  function automatic logic [N-1:0] rand_n();
    case ($urandom_range(0, 9))
      0:       return '1;
      1:       return '0;
      2:       return N'($urandom());
      default: return {$urandom(), $urandom()};
    endcase
  endfunction

  initial begin
    int lat;
    rst_n = 1'b0; in_valid = 1'b0; sub = 1'b0; clr = 1'b0; x = '0; y = '0;
    model_reset();
    repeat (2) @(posedge clk);
    #1;
    compare("reset");
    @(negedge clk);
    rst_n = 1'b1;

    // 1. Latency.
    @(negedge clk);
    in_valid = 1'b1; clr = 1'b1; sub = 1'b0; x = 64'd3; y = 64'd5;
    @(posedge clk);
    model_step();
    @(negedge clk);
    in_valid = 1'b0; clr = 1'b0;
    lat = 0;
    for (int k = 1; k <= 4; k++) begin
      @(posedge clk);
      model_step();
      #1;
      compare("latency");
      if (acc_valid && lat == 0) lat = k;
    end
    checks++;
    if (lat != 1 || acc !== 128'd15) begin
      failures++;
      $display("FAIL latency %0d clocks (expected 1), acc=%0d (expected 15)", lat, acc);
    end

    // 2. Directed dot product.
    for (int i = 1; i <= 8; i++)
      cycle(1'b1, 1'b0, i == 1, N'(i), N'(i + 8), "dot product");
    cycle(1'b1, 1'b1, 1'b0, 64'd7, 64'd7, "subtract");
    cycle(1'b0, 1'b0, 1'b0, '0, '0, "drain");
    cycle(1'b0, 1'b0, 1'b0, '0, '0, "drain");
    checks++;
    if (acc !== 128'd443) begin
      failures++;
      $display("FAIL dot product: acc=%0d, expected %0d", acc, 492 - 49);
    end

    // 3. 32 x 32 operands.
    for (int n = 0; n < 500; n++) begin
      cycle(1'($urandom_range(0, 3) != 0), 1'($urandom_range(0, 3) == 0), n == 0,
            N'($urandom()), N'($urandom()), "32x32");
      n_narrow++;
    end

    // 4. Random traffic with a reset in the middle.
    for (int n = 0; n < 20000; n++) begin
      if (n == 10000) begin
        @(negedge clk);
        rst_n = 1'b0;
        in_valid = 1'b0;
        clr = 1'b0;
        #1;
        model_reset();
        compare("asynchronous reset");
        n_reset++;
        @(negedge clk);
        rst_n = 1'b1;
        @(posedge clk);
        model_step();
        #1;
        compare("after reset");
      end
      cycle(1'($urandom_range(0, 4) != 0), 1'($urandom_range(0, 2) == 0),
            1'($urandom_range(0, 30) == 0), rand_n(), rand_n(), "random");
    end

    // Every mechanism must have happened.
    checks++;
    if (n_add == 0 || n_sub == 0 || n_clr_op == 0 || n_clr_only == 0 || n_idle == 0 ||
        n_b2b == 0 || n_wrap_up == 0 || n_wrap_down == 0 || n_reset == 0 || n_narrow == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: add=%0d sub=%0d clear_with_op=%0d clear_only=%0d idle=%0d",
             n_add, n_sub, n_clr_op, n_clr_only, n_idle);
    $display("mechanisms: back_to_back=%0d wrap_up=%0d wrap_down=%0d reset=%0d narrow_32x32=%0d",
             n_b2b, n_wrap_up, n_wrap_down, n_reset, n_narrow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
