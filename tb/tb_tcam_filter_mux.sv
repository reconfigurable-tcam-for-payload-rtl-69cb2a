// tb_tcam_filter_mux: random inputs to the filtering multiplexer; the output
// must equal the slice of the selected bank.
module tb_tcam_filter_mux;
  localparam int NB = 4, W = 37;
  logic [1:0] sel;
  logic [NB*W-1:0] din;
  logic [W-1:0] dout;
  int checks = 0, failures = 0;
  tcam_filter_mux #(.NB(NB), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] parts [NB];
    for (int t = 0; t < 500; t++) begin
      for (int b = 0; b < NB; b++) parts[b] = {5'($urandom), $urandom};
      din = {parts[3], parts[2], parts[1], parts[0]};
      sel = 2'($urandom);
      #1;
      checks++;
      if (dout !== parts[sel]) begin
        failures++;
        $display("FAIL sel=%0d got %h exp %h", sel, dout, parts[sel]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
