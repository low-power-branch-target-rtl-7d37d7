// tb_acbtb_cnt: self-checking test of the CNT counter and zero comparator.
// Random set/load/decrement stimulus is applied and CNT and the zero flag are
// compared every cycle with a reference model kept in the testbench. Directed
// checks first: load of T_D versus NT_D by direction, count-down to zero in
// exactly the loaded number of fetches, and set priority.
module tb_acbtb_cnt;
  localparam int unsigned DIST_W = 9;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic              set, load, dir_taken, dec;
  logic [DIST_W-1:0] set_val, nt_d, t_d, cnt;
  logic              zero;
  int checks = 0, failures = 0;
  int unsigned model;

  acbtb_cnt #(.DIST_W(DIST_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: cnt=%0d zero=%0b model=%0d", what, cnt, zero, model);
    end
  endtask

  task automatic idle();
    set = 0; load = 0; dec = 0; dir_taken = 0; set_val = '0; nt_d = '0; t_d = '0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    model = 0;
    check("reset", cnt == 0 && zero);
    // load taken distance, count down
    load = 1; dir_taken = 1; t_d = 9'd5; nt_d = 9'd17;
    @(negedge clk); idle();
    model = 5;
    check("load T_D", cnt == 5 && !zero);
    for (int i = 4; i >= 0; i--) begin
      dec = 1; @(negedge clk); idle();
      model = i;
      check("count down", cnt == 9'(i) && zero == (i == 0));
    end
    // load not-taken distance
    load = 1; dir_taken = 0; t_d = 9'd5; nt_d = 9'd300;
    @(negedge clk); idle();
    model = 300;
    check("load NT_D", cnt == 300);
    // set wins over load and dec
    set = 1; set_val = 9'd42; load = 1; dir_taken = 1; t_d = 9'd7; dec = 1;
    @(negedge clk); idle();
    model = 42;
    check("set priority", cnt == 42);
    // load wins over dec
    load = 1; dec = 1; nt_d = 9'd3;
    @(negedge clk); idle();
    model = 3;
    check("load over dec", cnt == 3);
    // random
    for (int n = 0; n < 3000; n++) begin
      set = ($urandom_range(0, 15) == 0); set_val = DIST_W'($urandom);
      load = ($urandom_range(0, 7) == 0); dir_taken = $urandom_range(0, 1);
      nt_d = DIST_W'($urandom_range(0, 20)); t_d = DIST_W'($urandom_range(0, 20));
      dec = $urandom_range(0, 1);
      if (set) model = set_val;
      else if (load) model = dir_taken ? t_d : nt_d;
      else if (dec && model != 0) model = model - 1;
      @(negedge clk);
      check("random", cnt == DIST_W'(model) && zero == (model == 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
