// tb_tcam_priority_encoder: exhaustive over a 10-line encoder and random over
// the 24-line default; the address must be the lowest set line.
module tb_tcam_priority_encoder;
  logic [9:0] ml_s;  logic hit_s; logic [3:0] addr_s;
  logic [23:0] ml_l; logic hit_l; logic [4:0] addr_l;
  int checks = 0, failures = 0;
  tcam_priority_encoder #(.N(10)) dut_s (.ml(ml_s), .hit(hit_s), .addr(addr_s));
  tcam_priority_encoder dut_l (.ml(ml_l), .hit(hit_l), .addr(addr_l));

  function automatic int lowest(logic [23:0] v);
    for (int i = 0; i < 24; i++) if (v[i]) return i;
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      int e;
      ml_s = 10'(v); #1;
      e = lowest(24'(v));
      checks++;
      if (hit_s !== (e >= 0) || (e >= 0 && int'(addr_s) != e)) begin
        failures++; $display("FAIL small %b -> %0d", ml_s, addr_s);
      end
    end
    for (int t = 0; t < 2000; t++) begin
      int e;
      ml_l = 24'($urandom) & 24'($urandom) & 24'($urandom);
      if (t % 7 == 0) ml_l = 24'(1) << $urandom_range(0, 23);
      #1;
      e = lowest(ml_l);
      checks++;
      if (hit_l !== (e >= 0) || (e >= 0 && int'(addr_l) != e)) begin
        failures++; $display("FAIL large %b -> %0d", ml_l, addr_l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
