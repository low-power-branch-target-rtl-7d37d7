// tb_acbtb_ind: self-checking test of the IND register and its path
// multiplexer, in both the explicit NT_I form (default) and the implicit
// IND + 1 form. Random set/load stimulus is compared with a reference model.
module tb_acbtb_ind;
  localparam int unsigned IDX_W = 6;
  logic             clk = 1'b0, rst_n = 1'b0;
  logic             set, load, dir_taken;
  logic [IDX_W-1:0] set_val, nt_i, t_i, idx_e, idx_i;
  int checks = 0, failures = 0;
  int unsigned me, mi;

  acbtb_ind #(.IDX_W(IDX_W)) dut_e (
    .clk, .rst_n, .set, .set_val, .load, .dir_taken, .nt_i, .t_i, .idx(idx_e));
  acbtb_ind #(.IDX_W(IDX_W), .NT_I_IMPLICIT(1'b1)) dut_i (
    .clk, .rst_n, .set, .set_val, .load, .dir_taken, .nt_i, .t_i, .idx(idx_i));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set = 0; load = 0; dir_taken = 0; set_val = 0; nt_i = 0; t_i = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    me = 0; mi = 0;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      set = ($urandom_range(0, 9) == 0); set_val = IDX_W'($urandom);
      load = $urandom_range(0, 1); dir_taken = $urandom_range(0, 1);
      nt_i = IDX_W'($urandom); t_i = IDX_W'($urandom);
      if (set) begin me = set_val; mi = set_val; end
      else if (load) begin
        me = dir_taken ? t_i : nt_i;
        mi = dir_taken ? t_i : (mi + 1) % 64;
      end
      @(negedge clk);
      checks++;
      if (idx_e != IDX_W'(me) || idx_i != IDX_W'(mi)) begin
        failures++;
        $display("FAIL n=%0d explicit %0d/%0d implicit %0d/%0d", n, idx_e, me, idx_i, mi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
