// tb_acbtb_workloads: runs synthetic hot spots shaped like the benchmarks
// whose hot spots fit the default 64-entry tables (adpcm, g721 and gsm,
// encoder and decoder) through acbtb_top at its default parameters, using
// acbtb_wl_bench.
// The bench reports through finished/checks/failures; this module prints the
// result line and ends the run, or ends it from a watchdog if the bench hangs.
module tb_acbtb_workloads;
  import acbtb_pkg::*;
  logic clk, rst_n, fetch_valid, fetch_stall, dp_valid, dp_taken;
  logic br_valid, br_taken, res_valid, res_taken, mispredict, ijmp_valid;
  br_type_t br_type;
  logic [31:0] br_target, ijmp_target, sw_wdata, sw_rdata;
  logic [5:0] br_idx;
  logic enabled, ind_wait, tbl_access, ibit_access, sw_we;
  logic [15:0] sw_addr;
  logic finished;
  int   checks, failures;

  acbtb_top dut (.*);
  acbtb_wl_bench #(.SET(0), .IDX_W(6), .NITER(200)) bench (.*);

  initial begin
    #1;
    wait (finished === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #400000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
