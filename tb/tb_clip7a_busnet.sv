// tb_clip7a_busnet: self-checking test of the element's address and data
// buses, buffer and transceiver, for every pair of bus drivers.
module tb_clip7a_busnet;
  import clip7_pkg::*;
  logic [1:0] as, ds;
  logic [W-1:0] g, cw, rr, pw, abus, dbus, ea, ed, al, dl;
  int checks = 0, failures = 0;

  clip7a_busnet dut (.abus_src(abus_src_e'(as)), .dbus_src(dbus_src_e'(ds)), .gaddr(g),
                     .coproc_wdata(cw), .ram_rdata(rr), .proc_wdata(pw), .abus, .dbus);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      as = 2'(i % 4); ds = 2'((i / 4) % 4);
      g = 16'($urandom); cw = 16'($urandom); rr = 16'($urandom); pw = 16'($urandom);
      #1;
      al = (as == 0) ? g : (as == 1) ? cw : 16'h0;
      dl = (ds == 0) ? rr : (ds == 1) ? pw : 16'h0;
      ea = (as == 2) ? dl : al;
      ed = (ds == 2) ? al : dl;
      checks++;
      if (abus !== ea || dbus !== ed) begin
        failures++;
        if (failures < 10) $display("bus mismatch as=%0d ds=%0d a=%h/%h d=%h/%h", as, ds, abus, ea, dbus, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
