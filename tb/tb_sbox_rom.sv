// tb_sbox_rom: checks all 256 S-Box entries on every read port against a
// separately computed S-Box and against published entries of the AES table.
module tb_sbox_rom;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int unsigned NP = AES_BLOCK_BYTES;

  aes_byte_t addr [NP];
  aes_byte_t data [NP];
  int checks = 0, failures = 0;

  sbox_rom dut (.addr(addr), .data(data));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Each port walks the whole table, offset so that ports read different
    // entries in the same step.
    for (int a = 0; a < 256; a++) begin
      for (int p = 0; p < NP; p++) addr[p] = 8'(a + 17 * p);
      #1;
      for (int p = 0; p < NP; p++)
        check(data[p], sbox_ref(8'(a + 17 * p)), $sformatf("port %0d addr %02h", p, 8'(a + 17 * p)));
    end
    // Published entries of the AES S-Box.
    addr[0] = 8'h00; addr[1] = 8'h01; addr[2] = 8'h53; addr[3] = 8'hFF;
    addr[4] = 8'h10; addr[5] = 8'hC9; addr[6] = 8'h7F; addr[7] = 8'h80;
    #1;
    check(data[0], 8'h63, "S(00)"); check(data[1], 8'h7C, "S(01)");
    check(data[2], 8'hED, "S(53)"); check(data[3], 8'h16, "S(FF)");
    check(data[4], 8'hCA, "S(10)"); check(data[5], 8'hDD, "S(C9)");
    check(data[6], 8'hD2, "S(7F)"); check(data[7], 8'hCD, "S(80)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
