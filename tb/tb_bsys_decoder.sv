// tb_bsys_decoder: exhaustive test of the 4:16 and 3:8 decoders.
module tb_bsys_decoder;
  logic [3:0]  sel4;
  logic [2:0]  sel3;
  logic        en;
  logic [15:0] oh16;
  logic [7:0]  oh8;
  int checks = 0, failures = 0;

  bsys_decoder #(.N(4)) dut16 (.sel(sel4), .en, .onehot(oh16));
  bsys_decoder #(.N(3)) dut8  (.sel(sel3), .en, .onehot(oh8));

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 16; i++) begin
        en = 1'(e); sel4 = 4'(i); sel3 = 3'(i); #1;
        checks += 2;
        if (oh16 != (e ? 16'(1) << i : 16'h0)) begin
          failures++; $display("FAIL 4:16 sel=%0d en=%0d got=%h", i, e, oh16);
        end
        if (oh8 != (e ? 8'(1) << (i % 8) : 8'h0)) begin
          failures++; $display("FAIL 3:8 sel=%0d en=%0d got=%h", i, e, oh8);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
