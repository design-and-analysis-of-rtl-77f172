// tb_wb_rw_gen: exhaustive self-checking test of the Wishbone strobe generator.
// All eight combinations of CYC_I, STB_I and WE_I, each compared with the classic-cycle rule.
module tb_wb_rw_gen;
  logic cyc, stb, we, rd, wr;
  int checks = 0, failures = 0;

  wb_rw_gen dut (.i_wb_cyc(cyc), .i_wb_stb(stb), .i_wb_we(we), .rd(rd), .wr(wr));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {cyc, stb, we} = 3'(v);
      #1;
      checks++;
      if (rd !== (v == 6) || wr !== (v == 7)) begin
        failures++;
        $display("FAIL cyc=%b stb=%b we=%b: rd=%b wr=%b", cyc, stb, we, rd, wr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
