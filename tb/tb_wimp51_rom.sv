// Test of the program ROM: all 256 locations are read and compared with the
// machine code of the built-in program (listed here byte by byte) and with
// 00H beyond it.
module tb_wimp51_rom;
  logic [7:0] addr, data;
  int checks = 0, failures = 0;

  localparam logic [7:0] PROG [57] = '{
    8'hC3, 8'h74, 8'h00, 8'h34, 8'h0A, 8'hD4, 8'h34, 8'hF0,
    8'hD4, 8'hC3, 8'h34, 8'h60, 8'hD4, 8'hC3, 8'hC4, 8'h34,
    8'h0F, 8'hD4, 8'hC3, 8'h34, 8'hFB, 8'hD4, 8'hC3, 8'h34,
    8'h44, 8'hD4, 8'hC3, 8'hD4, 8'h74, 8'h05, 8'h34, 8'h07,
    8'hFF, 8'h3F, 8'hC4, 8'hEF, 8'h6F, 8'h4F, 8'hC4, 8'h3F,
    8'h5F, 8'hD3, 8'hC3, 8'h74, 8'h04, 8'hC3, 8'h34, 8'hFF,
    8'h60, 8'h02, 8'h80, 8'hF9, 8'hD3, 8'h34, 8'h02, 8'h80,
    8'hFE
  };

  wimp51_rom dut (.addr(addr), .data(data));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      logic [7:0] e;
      addr = 8'(i);
      #1;
      e = (i < 57) ? PROG[i] : 8'h00;
      checks++;
      if (data !== e) begin
        failures++;
        $display("FAIL: ROM[%02h]=%02h exp %02h", addr, data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
