// Self-checking testbench for bnn_ocb.
//
// Fills the kernel buffer with random words, then reads every address in a
// random order and checks each word one cycle after its address, and checks
// that a read of the address being written returns the previous word.
module tb_bnn_ocb;
  localparam int unsigned W = 54, DEPTH = 88, AW = $clog2(DEPTH);

  logic          clk = 0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  model [DEPTH];
  int checks = 0, failures = 0;

  bnn_ocb #(.WORD_W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = {$urandom, $urandom};
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      int a = $urandom_range(DEPTH - 1);
      @(negedge clk);
      raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", a, rdata, model[a]);
      end
    end
    // read-during-write returns the old word
    @(negedge clk);
    we = 1; waddr = 5; raddr = 5; wdata = ~model[5];
    @(negedge clk);
    we = 0;
    checks++;
    if (rdata !== model[5]) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk);
    checks++;
    if (rdata !== ~model[5]) begin failures++; $display("FAIL write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
