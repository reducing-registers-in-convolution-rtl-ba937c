// Self-checking testbench for bnn_xnor_popcount.
//
// Drives random and corner-case bit vectors and checks the count against a
// reference computed in +-1 arithmetic: s = sum of (+-1)*(+-1) products, and
// the expected count of agreeing bits is (s + N) / 2.
module tb_bnn_xnor_popcount;
  localparam int unsigned N  = 54;
  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  a, w;
  logic [CW-1:0] cnt;
  int checks = 0, failures = 0;

  bnn_xnor_popcount #(.N(N)) dut (.a(a), .w(w), .cnt(cnt));

  function automatic int ref_count(logic [N-1:0] av, logic [N-1:0] wv);
    int s = 0;
    for (int i = 0; i < N; i++) s += (av[i] ? 1 : -1) * (wv[i] ? 1 : -1);
    return (s + N) / 2;
  endfunction

  task automatic check_one(logic [N-1:0] av, logic [N-1:0] wv);
    a = av; w = wv;
    #1;
    checks++;
    if (int'(cnt) != ref_count(av, wv)) begin
      failures++;
      $display("FAIL a=%h w=%h cnt=%0d exp=%0d", av, wv, cnt, ref_count(av, wv));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0, '0);          // all agree
    check_one('1, '1);
    check_one('0, '1);          // none agree
    check_one({N{1'b1}} >> 1, '0);
    for (int i = 0; i < 1000; i++)
      check_one({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
