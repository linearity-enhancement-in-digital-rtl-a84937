// tb_current_array: self-check of the behavioural current-source model.
// Random unit currents and random switch states are applied; Iop must be
// the sum of the currents of the cells switched to Iop and Ion the sum of
// the rest, both worked out here in a plain loop.
module tb_current_array;
  import mdac_pkg::*;
  int checks = 0, failures = 0;
  logic [N_CELLS-1:0] on, on_n;
  logic [15:0] cur [N_CELLS];
  logic [23:0] iop, ion;

  current_array #(.CELLS(N_CELLS), .CUR_W(16), .OUT_W(24)) dut (
    .on(on), .on_n(on_n), .unit_current(cur), .iop(iop), .ion(ion));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 100; it++) begin
      longint exp_p, exp_n;
      exp_p = 0;
      exp_n = 0;
      for (int k = 0; k < N_CELLS; k++) begin
        cur[k]  = 16'($urandom);
        on[k]   = 1'($urandom);
        on_n[k] = ~on[k];
      end
      if (it == 0) on_n = '0;          // both outputs off: Ion must read 0
      if (it == 1) on   = '1;          // all on
      #1;
      for (int k = 0; k < N_CELLS; k++) begin
        if (on[k])   exp_p += longint'(cur[k]);
        if (on_n[k]) exp_n += longint'(cur[k]);
      end
      checks++;
      if (longint'(iop) != exp_p) begin
        failures++;
        $display("FAIL iter %0d iop=%0d expected %0d", it, iop, exp_p);
      end
      checks++;
      if (longint'(ion) != exp_n) begin
        failures++;
        $display("FAIL iter %0d ion=%0d expected %0d", it, ion, exp_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
