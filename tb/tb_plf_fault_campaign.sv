// tb_plf_fault_campaign: single-fault injection campaign at both data widths
// the buffer is meant for, 4 and 8 dual-rail bits, each on its own 4-stage
// pipeline (see plf_campaign_env for the fault model, the PLF sweep and the
// checks). The two campaigns run side by side; their checks are summed.
module tb_plf_fault_campaign;
  timeunit 1ps;
  timeprecision 1ps;

  int checks4, failures4, checks8, failures8;
  bit done4, done8;

  plf_campaign_env #(.W(4)) u_w4 (.checks(checks4), .failures(failures4), .done(done4));
  plf_campaign_env #(.W(8)) u_w8 (.checks(checks8), .failures(failures8), .done(done8));

  initial begin
    #2000000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks8, failures4 + failures8 + 1);
    $finish;
  end

  initial begin
    wait (done4 && done8);
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks8, failures4 + failures8);
    $finish;
  end
endmodule
