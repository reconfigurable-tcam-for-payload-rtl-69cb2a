// tb_tcam_compare: random ternary words and keys into the comparator.
//
// A third of the keys are random, a third match a stored word (its value with
// the don't-care bits randomised) and a third are near misses: a matching key
// with one cared-about bit flipped, walking over every bit position. Each
// match line is checked bit by bit
// against a per-bit loop in the testbench, including invalid words.
module tb_tcam_compare;
  localparam int DW = 20, D = 8;
  logic [DW-1:0] key;
  logic [D*DW-1:0] ent_data, ent_care;
  logic [D-1:0] ent_valid, ml;
  int checks = 0, failures = 0, n_match = 0, n_nomatch = 0, n_near = 0;
  tcam_compare #(.DATA_W(DW), .DEPTH(D)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [DW-1:0] v [D];
      logic [DW-1:0] c [D];
      for (int i = 0; i < D; i++) begin
        c[i] = DW'($urandom) | DW'($urandom);
        v[i] = DW'($urandom) & c[i];
        ent_data[i*DW +: DW] = v[i];
        ent_care[i*DW +: DW] = c[i];
      end
      ent_valid = D'($urandom) | D'($urandom);
      key = DW'($urandom);
      begin
        automatic int j = $urandom_range(0, D-1);
        automatic int sel = $urandom_range(0, 2);
        automatic int kb = $urandom_range(0, DW-1);
        if (sel != 0) key = v[j] | (key & ~c[j]);
        // near miss: flip one bit of a matching key (a cared bit when possible)
        if (sel == 2) begin
          for (int k = 0; k < DW; k++) if (c[j][(kb + k) % DW]) begin kb = (kb + k) % DW; break; end
          key[kb] = ~key[kb];
          n_near++;
        end
      end
      #1;
      for (int i = 0; i < D; i++) begin
        automatic bit e = ent_valid[i];
        for (int k = 0; k < DW; k++) if (c[i][k] && key[k] != v[i][k]) e = 0;
        checks++;
        if (e) n_match++; else n_nomatch++;
        if (ml[i] !== e) begin failures++; $display("FAIL t=%0d line %0d", t, i); end
      end
    end
    checks++;
    if (n_match < 100) begin failures++; $display("FAIL too few matches"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
