// tb_dbus_mux: checks that DBSEL picks Kpmn_DB or ALU_DB and that the take strobe reaches
// only the selected source.
module tb_dbus_mux;
  import pi16_pkg::*;
  logic dbsel, take, kpmn_rd, alu_rd;
  word_t kpmn_db, alu_db, kpm_alu_db;
  int checks = 0, failures = 0;

  dbus_mux dut (.dbsel, .kpmn_db, .alu_db, .take, .kpmn_rd, .alu_rd, .kpm_alu_db);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      dbsel = 1'($urandom); take = 1'($urandom);
      kpmn_db = word_t'($urandom); alu_db = word_t'($urandom);
      #1;
      checks += 3;
      if (kpm_alu_db !== (dbsel ? alu_db : kpmn_db)) failures++;
      if (kpmn_rd !== (take && !dbsel)) failures++;
      if (alu_rd !== (take && dbsel)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
