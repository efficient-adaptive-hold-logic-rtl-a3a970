// Random-operand workload for one aging_aware_multiplier configuration,
// used by tb_workload_sizes and tb_workload_variants. It streams N_OPS
// random operand pairs through a multiplier of width M, NR4SD flavour KIND,
// judging threshold N_ZEROS and judged operand JUDGE_MR (0: multiplicand,
// 1: multiplier), and checks every product against the signed integer
// product.
//
// Path delay model (as in tb_aging_aware_multiplier): an operation whose
// judged operand has at most slow_z zeros misses the clock edge when it is
// given one cycle; the harness then forces a wrong value on the Razor
// input up to the edge and the right value until after the delayed clock.
// After every capture edge the captured result is held past the delayed
// clock, since real paths are longer than the clk to clk_del skew. The first
// half of the run uses slow_z = N_ZEROS (no errors expected), the second
// half slow_z = N_ZEROS + 1 (errors until the aging indicator switches to
// the second judging block).
// Outputs: done, checks, failures and the counts of one-cycle and
// two-cycle operations, Razor errors and total cycles.
module ahl_mult_workload
  import ahl_mult_pkg::*;
#(
  parameter int M       = 8,
  parameter nr4sd_kind_e KIND = NR4SD_MINUS,
  parameter bit JUDGE_MR = 1'b0,
  parameter int N_ZEROS = 3,
  parameter int N_OPS   = 1000
) (
  output bit done,
  output int checks,
  output int failures,
  output int n_one,
  output int n_two,
  output int n_err,
  output int n_inj,
  output int cyc_total,
  output bit aged
);

  localparam int T = 10;
  localparam int W = 2 * M;

  logic         clk = 0, clk_del = 0, rst_n = 0;
  logic         in_valid = 0;
  logic [M-1:0] md = '0, mr = '0;
  logic         in_ready, product_valid, reexecute;
  logic [W-1:0] product;

  aging_aware_multiplier #(.M(M), .KIND(KIND), .N_ZEROS(N_ZEROS), .JUDGE_MR(JUDGE_MR)) dut (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n), .in_valid(in_valid), .md(md), .mr(mr),
    .in_ready(in_ready), .product(product), .product_valid(product_valid),
    .reexecute(reexecute), .aged(aged)
  );

  always #(T/2) clk = ~clk;
  always @(clk) clk_del <= #3 clk;

  logic [W-1:0] exp_q [$];
  int  slow_z = N_ZEROS;
  int  n_issued = 0, n_done = 0;
  bit  running = 0;
  logic [M-1:0] cur_op;
  bit  cur_valid = 0, have_cur = 0, cur_stall = 0, cur_aged = 0, cur_aged2 = 0;
  int  cur_cyc = 0;

  initial begin
    done = 0; checks = 0; failures = 0; n_one = 0; n_two = 0;
    n_err = 0; n_inj = 0; cyc_total = 0;
  end

  function automatic logic [W-1:0] ref_mul(input logic [M-1:0] a, input logic [M-1:0] b);
    return W'(longint'($signed(a)) * longint'($signed(b)));
  endfunction

  always @(negedge clk) begin
    if (cur_cyc == 0) cur_aged = aged;
    if (cur_cyc == 1) cur_aged2 = aged;
  end

  always @(negedge clk) if (running) begin
    #1;
    if (dut.u_ahl.not_gating && dut.v_q && !reexecute) begin
      logic [W-1:0] right;
      right = ref_mul(dut.md_q, dut.mr_q);
      if (cur_cyc == 0 && $countones(~(JUDGE_MR ? dut.mr_q : dut.md_q)) <= slow_z) begin
        n_inj++;
        force dut.u_razor.d = right ^ W'(1);
      end
      @(posedge clk);
      #1 force dut.u_razor.d = right;
      #3 force dut.u_razor.d = dut.mult_p;
    end
  end

  always @(posedge clk) if (running) begin
    cyc_total++;
    cur_cyc++;
    if (cur_cyc == 1) cur_stall = reexecute;
    if (reexecute) n_err++;
    if (product_valid) begin
      checks++;
      if (exp_q.size() == 0) failures++;
      else begin
        logic [W-1:0] e;
        e = exp_q.pop_front();
        if (product !== e) begin
          failures++;
          if (failures < 5) $display("FAIL M=%0d product %h, expected %h", M, product, e);
        end
      end
      n_done++;
    end
    if (in_ready) begin
      if (have_cur) begin
        int z, exp_cyc;
        bit two;
        z = $countones(~cur_op);
        two = !(z > (cur_aged ? N_ZEROS + 1 : N_ZEROS));
        // a one-cycle pattern held by a Razor error is judged again in its
        // second cycle; if the aging indicator has just switched, the
        // stricter block can give it a further cycle
        exp_cyc = two ? 2 : !cur_stall ? 1 :
                  (cur_aged2 && !cur_aged && z == N_ZEROS + 1) ? 3 : 2;
        checks++;
        if (cur_cyc != exp_cyc) begin
          failures++;
          if (failures < 5) $display("FAIL M=%0d operand %h stayed %0d cycles, expected %0d", M, cur_op, cur_cyc, exp_cyc);
        end
        if (cur_valid) begin
          if (two) n_two++; else n_one++;
        end
      end
      have_cur  = 1;
      cur_op    = JUDGE_MR ? mr : md;
      cur_valid = in_valid;
      cur_cyc   = 0;
      if (in_valid) begin
        exp_q.push_back(ref_mul(md, mr));
        n_issued++;
      end
      if (n_issued < N_OPS) begin
        in_valid <= 1'b1;
        md <= M'($urandom);
        mr <= M'($urandom);
      end else in_valid <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1;
    in_valid = 1; md = M'($urandom); mr = M'($urandom);
    running = 1;
    wait (n_issued >= N_OPS / 2);
    checks++;
    if (n_err != 0) begin failures++; $display("FAIL M=%0d: %0d errors while young", M, n_err); end
    slow_z = N_ZEROS + 1;
    wait (n_done == N_OPS);
    repeat (2) @(posedge clk);
    checks += 3;
    if (n_err != n_inj) begin failures++; $display("FAIL M=%0d: %0d errors, %0d late arrivals", M, n_err, n_inj); end
    if (!aged) begin failures++; $display("FAIL M=%0d: aging indicator never fired", M); end
    if (exp_q.size() != 0) begin failures++; $display("FAIL M=%0d: products missing", M); end
    done = 1;
  end

endmodule
