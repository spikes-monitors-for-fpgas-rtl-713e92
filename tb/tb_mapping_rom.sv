// tb_mapping_rom: every entry of the mapping ROM must hold ADDR_BASE + index.
module tb_mapping_rom;
  localparam int unsigned N = 32, BASE = 16'h0340;
  logic [4:0]  idx;
  logic [15:0] addr;
  int checks = 0, failures = 0;

  mapping_rom #(.N_WORDS(N), .ADDR_BASE(BASE)) dut (.idx, .addr);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      idx = 5'(i);
      #1;
      checks++;
      if (addr !== 16'(16'h0340 + i)) begin
        failures++;
        $display("FAIL rom[%0d] = %h", i, addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
