// tb_pulse_workload: the transient pulse stimuli used to characterise the
// three architectures, replayed at logic level on the full-size top.
//
// Every operand bit is a pulse train of 5 ns high time; the pattern of
// which one bit runs differently decides the comparison sequence:
//   serial profile  : all bits 5 ns / 10 ns period, except B[63] with a
//                     15 ns period;
//   parallel profile: all bits 5 ns / 10 ns, except A[63], which is the
//                     same 10 ns pulse inverted;
//   tree profile    : all bits 5 ns / 10 ns, except A[63], an inverted
//                     pulse of 15 ns period.
// Each profile runs for 100 ns, sampled every 1 ns (timeunit 1ns). At each
// sample all three architectures are checked against integer comparison.
// Operand bits are numbered 0..63 here. The test fails if A>B or A<B never
// occurs in a profile, or A=B never occurs in the serial or tree profile
// (in the parallel profile the two MSBs always differ, so A=B cannot occur).
`timescale 1ns/1ps
module tb_pulse_workload
  import mag_comp_pkg::*;
  import tb_cmp_pkg::*;
;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] a, b;
  cmp_result_t  res_serial, res_parallel, res_tree, exp;

  mag_comp64_top dut (
    .a(a), .b(b),
    .res_serial(res_serial), .res_parallel(res_parallel), .res_tree(res_tree)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 5 ns-wide pulse of the given period, high at the start of each period
  function automatic logic pulse(int t, int period);
    return (t % period) < 5;
  endfunction

  task automatic check_one(string what, cmp_result_t got, cmp_result_t want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %b expected %b", what, got, want);
    end
  endtask

  task automatic run_profile(int profile, string name);
    int n_gt = 0, n_lt = 0, n_eq = 0;
    for (int t = 0; t < 100; t++) begin
      logic p10;
      p10 = pulse(t, 10);
      a = {W{p10}};
      b = {W{p10}};
      case (profile)
        0: b[W-1] = pulse(t, 15);
        1: a[W-1] = ~pulse(t, 10);
        default: a[W-1] = ~pulse(t, 15);
      endcase
      #1;
      exp = ref_cmp(a, b);
      check_one($sformatf("%s t=%0d serial", name, t),   res_serial,   exp);
      check_one($sformatf("%s t=%0d parallel", name, t), res_parallel, exp);
      check_one($sformatf("%s t=%0d tree", name, t),     res_tree,     exp);
      if (exp.gt) n_gt++;
      if (exp.lt) n_lt++;
      if (exp.eq) n_eq++;
    end
    $display("%s profile: A>B %0d ns, A<B %0d ns, A=B %0d ns", name, n_gt, n_lt, n_eq);
    checks++;
    // With A[63] the inverse of B[63] (parallel profile) equality cannot occur.
    if (n_gt == 0 || n_lt == 0 || (n_eq == 0 && profile != 1)) begin
      failures++;
      $display("FAIL %s profile did not produce the expected outcomes", name);
    end
  endtask

  initial begin
    run_profile(0, "serial");
    run_profile(1, "parallel");
    run_profile(2, "tree");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
