// Self-checking testbench for bnn_pe.
//
// Feeds the PE the stream the array produces: for each Loop-2 slice, Q
// kernel slices on consecutive cycles with random input windows and weights,
// with random empty cycles mixed in. A reference model keeps one +-1 sum per
// kernel (independent of the XNOR/popcount form) and expects, one cycle
// after each last slice, res_valid with the kernel index and the count of
// agreeing bits (s + Nk) / 2, registered at the clock edge that ends the
// cycle in which the last slice is read. Also checks that no result appears
// otherwise.
module tb_bnn_pe;
  import bnn_pkg::*;
  localparam int unsigned K = 3, DU = 6, Q = 4, NS = 5, ACC_W = 11;
  localparam int unsigned N = K * K * DU;

  logic clk = 0, rst_n = 0;
  logic [K-1:0][K-1:0][DU-1:0] win, kern;
  ktag_t tag;
  logic res_valid;
  logic [1:0] res_q;
  logic [ACC_W-1:0] res_sum;
  int checks = 0, failures = 0;
  int s_ref [Q];
  int bubbles = 0;

  // expectation for the clock edge that ends the current cycle
  logic exp_valid;
  int   exp_q, exp_sum;

  bnn_pe #(.K(K), .DU(DU), .Q(Q), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pm_sum(logic [N-1:0] a, logic [N-1:0] b);
    int s = 0;
    for (int i = 0; i < N; i++) s += (a[i] == b[i]) ? 1 : -1;
    return s;
  endfunction

  // check the output registered from the inputs of the cycle just ended
  task automatic check_out();
    checks++;
    if (res_valid !== exp_valid ||
        (exp_valid && (int'(res_q) != exp_q || int'(res_sum) != exp_sum))) begin
      failures++;
      $display("FAIL t=%0t valid %b/%b q %0d/%0d sum %0d/%0d", $time,
               res_valid, exp_valid, res_q, exp_q, res_sum, exp_sum);
    end
  endtask

  initial begin
    tag = '0; win = '0; kern = '0; exp_valid = 0; exp_q = 0; exp_sum = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      for (int d = 0; d < NS; d++) begin
        for (int q = 0; q < Q; q++) begin
          // optional bubble with garbage data
          while ($urandom_range(3) == 0) begin
            @(negedge clk);
            tag = '0; tag.q = QIDX_W'($urandom_range(Q - 1)); tag.first = 1; tag.last = 1;
            win = {$urandom, $urandom}; kern = {$urandom, $urandom};
            exp_valid = 0;
            @(posedge clk); #1; check_out();
            bubbles++;
          end
          @(negedge clk);
          win = {$urandom, $urandom}; kern = {$urandom, $urandom};
          tag.valid = 1; tag.q = QIDX_W'(q);
          tag.first = (d == 0); tag.last = (d == NS - 1);
          if (d == 0) s_ref[q] = 0;
          s_ref[q] += pm_sum(win, kern);
          exp_valid = (d == NS - 1);
          exp_q     = q;
          exp_sum   = (s_ref[q] + int'(N * NS)) / 2;
          @(posedge clk); #1; check_out();
        end
      end
    end
    @(negedge clk); tag = '0;
    exp_valid = 0;
    @(posedge clk); #1; check_out();
    if (bubbles == 0) begin failures++; $display("FAIL no bubbles exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
