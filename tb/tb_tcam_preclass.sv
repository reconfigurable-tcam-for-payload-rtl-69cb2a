// tb_tcam_preclass: exhaustive check of the pre-classification decoder.
//
// Every combination of selector, selector care bits, delete-in-backup flag,
// bank-full flags and backup-CAM-full flag (2-bit selector) is applied with
// each of no operation, search, update and delete. The one-hot bank enable,
// the write and clear strobes and the refusal flag are compared with the
// rules written out independently below.
module tb_tcam_preclass;
  localparam int SW = 2, NB = 4;
  logic op_search, op_update, op_delete, del_buc, buc_full, buc_wr, buc_clr, upd_fail;
  logic [SW-1:0] sel, sel_care;
  logic [NB-1:0] bank_full, bank_en, bank_wr, bank_clr;
  int checks = 0, failures = 0;

  tcam_preclass #(.SEL_W(SW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 4; op++) begin
      for (int v = 0; v < (1 << (SW + SW + 1 + NB + 1)); v++) begin
        logic [NB-1:0] e_en, e_wr, e_clr;
        logic e_buc, e_bclr, e_fail;
        op_search = (op == 1); op_update = (op == 2); op_delete = (op == 3);
        {sel, sel_care, del_buc, bank_full, buc_full} = v[SW+SW+NB+1:0];
        #1;
        e_en = 0; e_wr = 0; e_clr = 0; e_buc = 0; e_bclr = 0; e_fail = 0;
        if (op_update) begin
          if (sel_care == 2'b11 && !bank_full[sel]) begin
            e_wr = 4'b0001 << sel; e_en = e_wr;
          end else if (!buc_full) e_buc = 1;
          else e_fail = 1;
        end else if (op_delete) begin
          if (del_buc) e_bclr = 1;
          else begin e_clr = 4'b0001 << sel; e_en = e_clr; end
        end else if (op_search) e_en = 4'b0001 << sel;
        checks++;
        if (bank_en !== e_en || bank_wr !== e_wr || bank_clr !== e_clr || buc_wr !== e_buc ||
            buc_clr !== e_bclr || upd_fail !== e_fail) begin
          failures++;
          $display("FAIL op=%0d v=%0h en=%b/%b wr=%b/%b clr=%b/%b buc=%b/%b bclr=%b/%b fail=%b/%b",
                   op, v, bank_en, e_en, bank_wr, e_wr, bank_clr, e_clr, buc_wr, e_buc,
                   buc_clr, e_bclr, upd_fail, e_fail);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
