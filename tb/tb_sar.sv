// tb_sar: loads a seed and polynomial into the signature register by scan,
// feeds random 64-bit outputs with each value of select, compares the
// state every clock with a software model, and reads the signature back
// through the scan output.
module tb_sar;
  import des_ref_pkg::*;

  logic clk = 0, scanmode = 0, si = 0, so;
  logic [1:0]  select = 0;
  logic [63:0] din = 0;
  logic [15:0] signature;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sar #(.WIDTH(16), .GROUPS(4)) dut (.clk, .scanmode, .select, .din, .scan_in(si),
                                     .scan_out(so), .signature);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Shift 32 bits {seed, poly} in, returning the 32 bits that come out.
  task automatic scan(logic [31:0] v, output logic [31:0] o);
    scanmode = 1;
    for (int i = 0; i < 32; i++) begin
      si = v[31 - i];
      o[31 - i] = so;
      @(posedge clk); #1;
    end
    scanmode = 0;
  endtask

  initial begin
    logic [15:0] seed, poly, m;
    logic [31:0] o;
    #1;
    for (int run = 0; run < 8; run++) begin
      seed = 16'($urandom);
      poly = 16'($urandom) | 16'h8000;
      scan({seed, poly}, o);
      m = seed;
      for (int t = 0; t < 200; t++) begin
        select = 2'((run + t / 50) % 4);
        din = {$urandom, $urandom};
        #1;
        m = sar_step(m, poly, din, int'(select));
        @(posedge clk); #1;
        checks++;
        if (signature !== m) begin
          failures++;
          $display("FAIL run %0d t %0d sel %0d sig=%h exp %h", run, t, select, signature, m);
        end
      end
      scan(32'd0, o);
      checks++;
      if (o !== {m, poly}) begin
        failures++;
        $display("FAIL scan out %h, expected %h", o, {m, poly});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
