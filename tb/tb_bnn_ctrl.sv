// Self-checking testbench for bnn_ctrl.
//
// Runs the sequencer twice over a small layer (2 groups of Q = 3 kernels,
// 4 slices per kernel, 2 x 3 tiles): once with random gaps on both external
// memory handshakes and once with data always ready. A model of the loop
// nest predicts, in order, every kernel word requested (kernel index, slice,
// buffer address) and every issue to the array (tile and slice requested,
// kernel index, first/last flags, input load only with the first kernel of a
// slice). A model buffer written through the controller's write port and
// read through its read address checks that the kernel presented at each
// issue is the one for that kernel and slice. With no gaps, the run must
// take groups*(Q*NS + 1 + tiles*NS*Q) + X + 2 busy cycles.
module tb_bnn_ctrl;
  import bnn_pkg::*;
  localparam int unsigned X = 4, Q = 3, NS = 4;
  localparam int unsigned DEPTH = Q * NS, AW = $clog2(DEPTH), SW = $clog2(NS);
  localparam int unsigned GROUPS = 2, TX = 2, TY = 3;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] cfg_groups = 16'(GROUPS), cfg_tiles_x = 16'(TX), cfg_tiles_y = 16'(TY);
  logic busy, done, kw_ready, kw_valid, in_ready, in_valid, stall, ocb_we, feed_ld_win;
  logic [15:0] kw_kernel, in_tx, in_ty;
  logic [SW-1:0] kw_d, in_d;
  logic [AW-1:0] ocb_waddr, ocb_raddr;
  ktag_t feed_tag;

  bnn_ctrl #(.X(X), .Q(Q), .NS(NS)) dut (.*);

  // model buffer: holds the global kernel index and slice of each word
  int mem_k [DEPTH], mem_d [DEPTH];
  int rd_k, rd_d;
  int checks = 0, failures = 0, stalls = 0, busy_cycles = 0;
  int random_gaps;
  // expected-stream cursors
  int lg, lq, ld;            // load cursor
  int ig, ity, itx, id, iq;  // issue cursor
  int loads, issues;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (busy) busy_cycles++;
      if (stall) stalls++;
      // kernel word transfer
      if (kw_ready && kw_valid) begin
        checks++;
        if (int'(kw_kernel) != lg * Q + lq || int'(kw_d) != ld || !ocb_we ||
            int'(ocb_waddr) != lq * NS + ld)
          fail($sformatf("load k=%0d d=%0d a=%0d exp k=%0d d=%0d", kw_kernel, kw_d,
                         ocb_waddr, lg * Q + lq, ld));
        mem_k[ocb_waddr] <= int'(kw_kernel);
        mem_d[ocb_waddr] <= int'(kw_d);
        loads++;
        if (++ld == NS) begin
          ld = 0;
          if (++lq == Q) begin lq = 0; lg++; end
        end
      end else if (ocb_we) fail("write without transfer");
      // issue to the array
      if (feed_tag.valid) begin
        checks++;
        if (int'(feed_tag.q) != iq || feed_tag.first != (id == 0) ||
            feed_tag.last != (id == NS - 1) || feed_ld_win != (iq == 0) ||
            rd_k != ig * Q + iq || rd_d != id ||
            (iq == 0 && (int'(in_tx) != itx || int'(in_ty) != ity || int'(in_d) != id ||
                         !in_ready || !in_valid)))
          fail($sformatf("issue q=%0d f=%b l=%b ld=%b kern=%0d/%0d tile=%0d,%0d d=%0d exp q=%0d d=%0d tile=%0d,%0d g=%0d",
                         feed_tag.q, feed_tag.first, feed_tag.last, feed_ld_win, rd_k, rd_d,
                         in_tx, in_ty, in_d, iq, id, itx, ity, ig));
        issues++;
        if (++iq == Q) begin
          iq = 0;
          if (++id == NS) begin
            id = 0;
            if (++itx == TX) begin
              itx = 0;
              if (++ity == TY) begin ity = 0; ig++; end
            end
          end
        end
      end else if (feed_ld_win) fail("input load without issue");
      // model synchronous read
      rd_k <= mem_k[ocb_raddr];
      rd_d <= mem_d[ocb_raddr];
      // random handshakes
      kw_valid <= random_gaps ? ($urandom_range(2) != 0) : 1'b1;
      in_valid <= random_gaps ? ($urandom_range(2) != 0) : 1'b1;
    end
  end

  task automatic run(int gaps);
    random_gaps = gaps;
    lg = 0; lq = 0; ld = 0; ig = 0; ity = 0; itx = 0; id = 0; iq = 0;
    loads = 0; issues = 0; busy_cycles = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (loads != GROUPS * Q * NS || issues != GROUPS * TX * TY * NS * Q)
      fail($sformatf("counts loads=%0d issues=%0d", loads, issues));
    if (!gaps) begin
      checks++;
      if (busy_cycles != GROUPS * (Q * NS + 1 + TX * TY * NS * Q) + X + 2)
        fail($sformatf("cycles %0d exp %0d", busy_cycles,
                       GROUPS * (Q * NS + 1 + TX * TY * NS * Q) + X + 2));
    end
    @(negedge clk);
    checks++;
    if (busy) fail("busy after done");
  endtask

  initial begin
    kw_valid = 0; in_valid = 0; random_gaps = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1);
    checks++;
    if (stalls == 0) fail("no stall exercised");
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
