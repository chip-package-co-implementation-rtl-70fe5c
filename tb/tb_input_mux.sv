// tb_input_mux: random data on both inputs, both settings of pads; the
// output must follow the pads when pads = 1 and the PRNG when pads = 0.
module tb_input_mux;
  logic        pads;
  logic [63:0] prng_data, pad_data, dout;
  int checks = 0, failures = 0;

  input_mux #(.WIDTH(64)) dut (.pads, .prng_data, .pad_data, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      prng_data = {$urandom, $urandom};
      pad_data  = {$urandom, $urandom};
      pads      = 1'(i % 2);
      #1;
      checks++;
      if (dout !== (pads ? pad_data : prng_data)) begin
        failures++;
        $display("FAIL pads=%b dout=%h", pads, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
