// tb_tristate_stage - checks the bus stage drives its codes only when enabled.
//
// With sme high the bus output must equal the input and drive must be high;
// with sme low the output must be all zeros, so that four stages can be
// ORed onto one bus.
module tb_tristate_stage;
  logic             sme = 0, drive;
  logic [49:0][1:0] din = '0, bus_out;
  int checks = 0, failures = 0;

  tristate_stage dut (.sme(sme), .din(din), .bus_out(bus_out), .drive(drive));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 50; i++) din[i] = 2'($urandom);
      sme = 1'($urandom);
      #1;
      checks += 2;
      if (drive != sme) failures++;
      if (bus_out != (sme ? din : '0)) begin
        failures++;
        if (failures < 10) $display("n=%0d sme=%0b wrong bus value", n, sme);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
