// Configuration sweep for bnn_rb_top: the array shapes and sizes the
// architecture is evaluated at, each running a small layer end to end.
//
//   * all 24-PE Loop-3 unrollings X x Y = 1x24, 2x12, 3x8, 6x4, 12x2 with
//     K = 3 and d = 6 (4x6 is the default and has its own testbenches),
//   * K = 9 at 4x6 and at 12x2,
//   * Q = 1, 2 and 3 kernels in flight at the default 4x6 shape.
// Every configuration uses 128 input channels. Each instance of
// bnn_tb_layer checks every sum against a direct convolution, the memory
// traffic and the bridge-register bit counts; this module adds up their
// results.
module tb_bnn_rb_configs;
  localparam int N = 10;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] fin;
  int ck [N];
  int fl [N];
  int checks, failures;

  always #5 clk = ~clk;

  bnn_tb_layer #(.X(1),  .Y(24), .H(28), .W(5),  .GROUPS(1)) u_1x24 (.clk, .rst_n, .finished(fin[0]), .checks(ck[0]), .failures(fl[0]));
  bnn_tb_layer #(.X(2),  .Y(12), .H(15), .W(6),  .GROUPS(1)) u_2x12 (.clk, .rst_n, .finished(fin[1]), .checks(ck[1]), .failures(fl[1]));
  bnn_tb_layer #(.X(3),  .Y(8),  .H(11), .W(8),  .GROUPS(1)) u_3x8  (.clk, .rst_n, .finished(fin[2]), .checks(ck[2]), .failures(fl[2]));
  bnn_tb_layer #(.X(6),  .Y(4),  .H(7),  .W(10), .GROUPS(1)) u_6x4  (.clk, .rst_n, .finished(fin[3]), .checks(ck[3]), .failures(fl[3]));
  bnn_tb_layer #(.X(12), .Y(2),  .H(5),  .W(16), .GROUPS(1)) u_12x2 (.clk, .rst_n, .finished(fin[4]), .checks(ck[4]), .failures(fl[4]));
  bnn_tb_layer #(.K(9), .X(4),  .Y(6), .H(15), .W(13), .GROUPS(1)) u_k9_4x6  (.clk, .rst_n, .finished(fin[5]), .checks(ck[5]), .failures(fl[5]));
  bnn_tb_layer #(.K(9), .X(12), .Y(2), .H(11), .W(21), .GROUPS(1)) u_k9_12x2 (.clk, .rst_n, .finished(fin[6]), .checks(ck[6]), .failures(fl[6]));
  bnn_tb_layer #(.Q(1), .H(9), .W(7), .GROUPS(3)) u_q1 (.clk, .rst_n, .finished(fin[7]), .checks(ck[7]), .failures(fl[7]));
  bnn_tb_layer #(.Q(2), .H(9), .W(7), .GROUPS(2)) u_q2 (.clk, .rst_n, .finished(fin[8]), .checks(ck[8]), .failures(fl[8]));
  bnn_tb_layer #(.Q(3), .H(9), .W(7), .GROUPS(2)) u_q3 (.clk, .rst_n, .finished(fin[9]), .checks(ck[9]), .failures(fl[9]));

  task automatic report(int extra);
    checks = 0; failures = extra;
    for (int i = 0; i < N; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired, finished %b", fin);
    report(1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&fin);
    @(negedge clk);
    report(0);
    $finish;
  end
endmodule
