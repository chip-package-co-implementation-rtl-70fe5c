// tb_des_million: one million random blocks, each with its own random key
// and random opmode, streamed through the DES pipeline at one block per
// clock and compared with the iterative DES model 16 cycles later.
module tb_des_million;
  import des_pkg::*;
  import des_ref_pkg::*;

  localparam int LAT = 16;
  localparam int NBLK = 1000000;

  logic   clk = 0;
  block_t din = 0, dout;
  khalf_t key_c = 0, key_d = 0;
  logic   opmode = 0, so_d, so_k1, so_k2;
  block_t exp_ring [LAT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  des_pipeline dut (
    .clk, .scanmode(1'b0), .din, .key_c, .key_d, .opmode, .dout,
    .scan_in_data(1'b0), .scan_in_key1(1'b0), .scan_in_key2(1'b0),
    .scan_out_data(so_d), .scan_out_key1(so_k1), .scan_out_key2(so_k2));

  initial begin
    #20050000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int t = 0; t < NBLK + LAT; t++) begin
      if (t < NBLK) begin
        din = {$urandom, $urandom};
        key_c = 28'($urandom); key_d = 28'($urandom); opmode = 1'($urandom);
        exp_ring[t % LAT] = des_ref(key_c, key_d, din, opmode);
      end
      @(posedge clk); #1;
      if (t >= LAT - 1 && t - (LAT - 1) < NBLK) begin
        checks++;
        if (dout !== exp_ring[(t - (LAT - 1)) % LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d: %h", t - (LAT - 1), dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
