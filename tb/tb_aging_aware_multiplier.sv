// End-to-end testbench for aging_aware_multiplier at its default parameters
// (16 x 16 bits, NR4SD-, n = 7 zeros, aging window 128 operations, error
// limit 8). It streams 13000 random operand pairs (with some bubbles) and
// checks every product against the signed integer product.
//
// Path delay model. Zero-delay simulation never misses a clock edge, so the
// testbench supplies the late arrivals that real aged silicon would
// produce. An operation is "slow" when its multiplicand has at most
// SLOW_Z zeros. When a slow operation is captured after a single cycle, the
// testbench forces the multiplier output to a wrong value up to the clock
// edge and to the right value until just after the delayed Razor clock,
// which is what a path longer than one period but shorter than the Razor
// window looks like to the register. After every capture edge it also
// keeps the captured result on the multiplier output until the delayed
// clock has passed: real paths are longer than the clk to clk_del skew
// (Razor's short-path rule), zero-delay ones are not. Three phases:
//   young   (5000 ops): SLOW_Z = 7, exactly the patterns the first judging
//                       block holds for two cycles, so no errors occur;
//   aged    (5000 ops): SLOW_Z = 8, patterns with 8 zeros fail in one cycle;
//                       Razor errors must appear, be corrected, and trip the
//                       aging indicator, after which the second judging block
//                       gives those patterns two cycles and errors stop;
//   worn    (3000 ops): SLOW_Z = 9, more than the AHL can absorb; errors
//                       keep coming and every product must still be right.
// Checked as well: the number of cycles each operand pair stays in the
// input registers (1 for a one-cycle pattern, 2 for a two-cycle pattern,
// 2 for a one-cycle pattern behind a Razor error), the number of Razor
// errors against the number injected, and that one-cycle patterns,
// two-cycle patterns, errors, re-execution stalls, bubbles and the aging
// switch each happened.
module tb_aging_aware_multiplier;

  localparam int M = 16;
  localparam int N_ZEROS = 7;
  localparam int T = 10;
  localparam int W = 2 * M;

  int checks = 0, failures = 0;

  logic           clk = 0, clk_del = 0, rst_n = 0;
  logic           in_valid = 0;
  logic [M-1:0]   md = '0, mr = '0;
  logic           in_ready, product_valid, reexecute, aged;
  logic [2*M-1:0] product;

  aging_aware_multiplier dut (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n), .in_valid(in_valid), .md(md), .mr(mr),
    .in_ready(in_ready), .product(product), .product_valid(product_valid),
    .reexecute(reexecute), .aged(aged)
  );

  always #(T/2) clk = ~clk;
  always @(clk) clk_del <= #3 clk;

  // ---------------------------------------------------------------- state
  logic [2*M-1:0] exp_q [$];          // products still to come, in order
  int  slow_z = N_ZEROS;              // delay model threshold
  int  phase = 0;
  int  n_issued = 0, n_done = 0, n_bubbles = 0;
  int  n_one = 0, n_two = 0, n_stall = 0, n_err = 0, n_inj = 0;
  int  n_strict = 0, err_after_switch = 0, cyc_total = 0;
  int  aged_at_op = -1;
  bit  running = 0;

  // operand pair now in the input registers
  logic [M-1:0] cur_md;
  bit  cur_valid = 0, have_cur = 0, cur_stall = 0, cur_aged = 0, cur_aged2 = 0;
  int  cur_cyc = 0;

  function automatic logic [2*M-1:0] ref_mul(input logic [M-1:0] a, input logic [M-1:0] b);
    return W'(longint'($signed(a)) * longint'($signed(b)));
  endfunction

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // aging state seen by the judging mux in the first cycle of an operation
  always @(negedge clk) begin
    if (cur_cyc == 0) cur_aged = aged;
    if (cur_cyc == 1) cur_aged2 = aged;
  end

  // ------------------------------------------------ path delay emulation
  // Before every edge at which the Razor register captures, decide whether
  // the operation is late; after the edge keep its result on the
  // multiplier output until the delayed clock has sampled it (every path
  // is longer than the clk to clk_del skew, as Razor requires).
  always @(negedge clk) if (running) begin
    #1;
    if (dut.u_ahl.not_gating && dut.v_q && !reexecute) begin
      logic [2*M-1:0] right;
      right = ref_mul(dut.md_q, dut.mr_q);
      if (cur_cyc == 0 && $countones(~dut.md_q) <= slow_z) begin
        n_inj++;
        force dut.u_razor.d = right ^ W'(1);  // not settled at the clock edge
      end
      @(posedge clk);
      #1 force dut.u_razor.d = right;         // settled before the delayed clock
      #3 force dut.u_razor.d = dut.mult_p;    // the next operation takes over
    end
  end

  // --------------------------------------------------------- main checker
  always @(posedge clk) if (running) begin
    cyc_total++;
    cur_cyc++;
    if (cur_cyc == 1) cur_stall = reexecute;
    if (reexecute) begin
      n_err++;
      if (aged_at_op >= 0 && n_done > aged_at_op + 4 && phase == 1) err_after_switch++;
    end
    if (product_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL product_valid with nothing outstanding");
      end else begin
        logic [2*M-1:0] e;
        e = exp_q.pop_front();
        if (product !== e) begin
          failures++;
          if (failures < 10) $display("FAIL product %h, expected %h", product, e);
        end
      end
      n_done++;
      if (aged && aged_at_op < 0) aged_at_op = n_done;
    end
    if (in_ready) begin
      // the pair in the registers is done; check how long it stayed
      if (have_cur) begin
        int z, exp_cyc;
        bit two;
        z = $countones(~cur_md);
        two = !(z > (cur_aged ? N_ZEROS + 1 : N_ZEROS));
        // a one-cycle pattern held by a Razor error is judged again in its
        // second cycle; if the aging indicator has just switched, the
        // stricter block can give it a further cycle
        exp_cyc = two ? 2 : !cur_stall ? 1 :
                  (cur_aged2 && !cur_aged && z == N_ZEROS + 1) ? 3 : 2;
        checks++;
        if (cur_cyc != exp_cyc) begin
          failures++;
          if (failures < 10)
            $display("FAIL md %h (%0d zeros) stayed %0d cycles, expected %0d", cur_md, z, cur_cyc, exp_cyc);
        end
        if (cur_valid) begin
          if (two) n_two++; else n_one++;
          if (!two && cur_stall) n_stall++;
          if (cur_aged && z == N_ZEROS + 1) n_strict++;
        end
      end
      // registers take md/mr now
      have_cur  = 1;
      cur_md    = md;
      cur_valid = in_valid;
      cur_cyc   = 0;
      if (in_valid) begin
        exp_q.push_back(ref_mul(md, mr));
        n_issued++;
      end else n_bubbles++;
      // next pair
      if (n_issued < 13000) begin
        in_valid <= ($urandom_range(0, 19) != 0);
        md <= M'($urandom);
        mr <= M'($urandom);
      end else begin
        in_valid <= 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1;
    in_valid = 1; md = M'($urandom); mr = M'($urandom);
    running = 1;
    wait (n_issued >= 5000);
    checks++;
    if (n_err != 0 || aged) begin
      failures++;
      $display("FAIL young phase: %0d errors, aged=%0b", n_err, aged);
    end
    phase = 1; slow_z = N_ZEROS + 1;
    wait (n_issued >= 10000);
    phase = 2; slow_z = N_ZEROS + 2;
    wait (n_done == 13000);
    repeat (3) @(posedge clk);
    checks += 10;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d products missing", exp_q.size()); end
    if (n_err != n_inj) begin failures++; $display("FAIL %0d Razor errors, %0d late arrivals", n_err, n_inj); end
    if (n_one == 0)     begin failures++; $display("FAIL no one-cycle operation"); end
    if (n_two == 0)     begin failures++; $display("FAIL no two-cycle operation"); end
    if (n_err == 0)     begin failures++; $display("FAIL no Razor error"); end
    if (n_stall == 0)   begin failures++; $display("FAIL no re-execution stall"); end
    if (n_bubbles == 0) begin failures++; $display("FAIL no bubble"); end
    if (!aged)          begin failures++; $display("FAIL aging indicator never fired"); end
    if (n_strict == 0)  begin failures++; $display("FAIL second judging block never held a pattern"); end
    if (err_after_switch != 0) begin
      failures++; $display("FAIL %0d errors in the aged phase after the switch", err_after_switch);
    end
    $display("ops %0d, bubbles %0d, one-cycle %0d, two-cycle %0d, Razor errors %0d, stalls %0d",
             n_done, n_bubbles, n_one, n_two, n_err, n_stall);
    $display("aging indicator fired after %0d operations; %0d 8-zero patterns held by block 2",
             aged_at_op, n_strict);
    $display("cycles %0d for %0d operations (%0.3f cycles per operation)",
             cyc_total, n_done, real'(cyc_total) / real'(n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
