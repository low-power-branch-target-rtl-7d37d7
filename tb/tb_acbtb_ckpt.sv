// tb_acbtb_ckpt: self-checking test of the misprediction checkpoint FIFO.
// Random push/pop/flush traffic is compared with a queue model: head record,
// empty/full/count, dropping of pushes when full and on flush.
module tb_acbtb_ckpt;
  localparam int unsigned DEPTH = 4, DIST_W = 9, IDX_W = 6, CNT_W = 3;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic              push, push_taken, pop, flush;
  logic [DIST_W-1:0] push_alt_d, head_alt_d;
  logic [IDX_W-1:0]  push_alt_i, head_alt_i;
  logic              head_taken, empty, full;
  logic [CNT_W-1:0]  count;
  int checks = 0, failures = 0;
  int full_seen = 0;
  logic [15:0] q[$];

  acbtb_ckpt #(.DEPTH(DEPTH), .DIST_W(DIST_W), .IDX_W(IDX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; flush = 0; push_taken = 0; push_alt_d = 0; push_alt_i = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 5000; n++) begin
      logic [15:0] rec;
      push = $urandom_range(0, 2) != 0;
      pop  = (q.size() != 0) && ($urandom_range(0, 2) == 0);
      flush = ($urandom_range(0, 40) == 0);
      push_taken = $urandom_range(0, 1); push_alt_d = DIST_W'($urandom); push_alt_i = IDX_W'($urandom);
      rec = {push_taken, push_alt_d, push_alt_i};
      #1;
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || count != CNT_W'(q.size())) begin
        failures++; $display("FAIL status n=%0d size=%0d count=%0d", n, q.size(), count);
      end
      if (q.size() != 0) begin
        checks++;
        if ({head_taken, head_alt_d, head_alt_i} != q[0]) begin
          failures++; $display("FAIL head n=%0d", n);
        end
      end
      if (full) full_seen++;
      if (flush) q.delete();
      else begin
        logic room;
        room = (q.size() < DEPTH) || pop;
        if (pop) void'(q.pop_front());
        if (push && room) q.push_back(rec);
      end
      @(negedge clk);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL full never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
