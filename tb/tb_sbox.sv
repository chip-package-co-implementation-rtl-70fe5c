// tb_sbox: exhaustive test of the eight S-box instances (S1..S8), all 64
// inputs each, against the standard row/column reading of the table
// (row = outer bits, column = middle bits), plus spot values of the DES
// standard written out independently.
module tb_sbox;
  import des_pkg::*;

  logic [5:0] addr;
  logic [3:0] dout [8];
  int checks = 0, failures = 0;

  for (genvar b = 0; b < 8; b++) begin : g_box
    sbox #(.BOX(b + 1)) dut (.addr(addr), .dout(dout[b]));
  end

  task automatic check(int box, logic [5:0] a, logic [3:0] exp);
    addr = a; #1;
    checks++;
    if (dout[box] !== exp) begin
      failures++;
      $display("FAIL S%0d(%b) = %0d, expected %0d", box + 1, a, dout[box], exp);
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
    for (int b = 0; b < 8; b++)
      for (int a = 0; a < 64; a++) begin
        logic [5:0] aa;
        aa = 6'(a);
        check(b, aa, SBOX[b][{aa[5], aa[0]}][aa[4:1]]);
      end
    // spot values from the standard
    check(0, 6'b000000, 4'd14);
    check(0, 6'b111111, 4'd13);
    check(4, 6'b011011, 4'd9);
    check(7, 6'b111111, 4'd11);
    check(1, 6'b000001, 4'd3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
