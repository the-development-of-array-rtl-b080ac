// clip7_ref_pkg: behavioural reference models used by the testbenches.
//
// chip_ref models one CLIP7 chip cycle by cycle from the control-word
// definitions, written independently of the RTL structure: state variables,
// a function for what the chip drives in the current cycle and a function for
// the clock edge. pe_ref builds one two-chip processing element from two
// chip_ref objects, a memory array, the address latch and the edge registers.
package clip7_ref_pkg;
  import clip7_pkg::*;

  function automatic logic [16:0] ref_alu(input logic [3:0] op, input logic [15:0] x,
                                          input logic [15:0] w, input logic ci);
    case (op)
      4'd0:  return 17'h0;
      4'd1:  return {1'b0, x};
      4'd2:  return {1'b0, w};
      4'd3:  return {1'b0, ~x};
      4'd4:  return {1'b0, x & w};
      4'd5:  return {1'b0, x | w};
      4'd6:  return {1'b0, x ^ w};
      4'd7:  return x + w;
      4'd8:  return {1'b0, x} + {1'b0, ~w} + 1;
      4'd9:  return {1'b0, w} + {1'b0, ~x} + 1;
      4'd10: return x + 1;
      4'd11: return {1'b0, x} + 17'h0ffff;
      4'd12: return {1'b0, x & ~w};
      4'd13: return x + w + ci;
      4'd14: return {1'b0, ~(x ^ w)};
      default: return {1'b0, 16'hffff};
    endcase
  endfunction

  function automatic logic ref_ovf(input logic [3:0] op, input logic [15:0] x,
                                   input logic [15:0] w, input logic [15:0] r);
    if (op == 4'd7 || op == 4'd13) return (x[15] == w[15]) && (r[15] != x[15]);
    if (op == 4'd8) return (x[15] != w[15]) && (r[15] != x[15]);
    if (op == 4'd9) return (x[15] != w[15]) && (r[15] != w[15]);
    return 1'b0;
  endfunction

  class chip_ref;
    logic [15:0] cond, sh, d;
    logic [15:0] b [4];
    logic [7:0]  nin;
    logic        nout;

    function new();
      reset();
    endfunction

    function void reset();
      cond = 0; sh = 0; d = 0; nin = 0; nout = 0;
      foreach (b[i]) b[i] = 0;
    endfunction

    function logic active(chip_ctrl_t c);
      return !c.act_en || cond[c.act_bit];
    endfunction

    function logic [15:0] a_operand(chip_ctrl_t c);
      if (c.a_nin) return {8'h0, nin};
      return b[c.b_local ? cond[11:10] : c.b_raddr];
    endfunction

    function logic [3:0] alu_fn(chip_ctrl_t c);
      return c.alu_local ? cond[15:12] : 4'(c.alu_op);
    endfunction

    function logic [16:0] alu_out(chip_ctrl_t c);
      return ref_alu(alu_fn(c), a_operand(c), sh, cond[1]);
    endfunction

    // value on the external bus when this chip drives it
    function logic [15:0] wdata(chip_ctrl_t c);
      if (c.bus_src == BUS_D) return d;
      return alu_out(c)[15:0];
    endfunction

    function logic [15:0] ibus(chip_ctrl_t c, logic [15:0] ext);
      case (c.bus_src)
        BUS_EXT: return ext;
        BUS_D:   return d;
        default: return alu_out(c)[15:0];
      endcase
    endfunction

    function logic [15:0] status(chip_ctrl_t c);
      logic [16:0] r;
      r = alu_out(c);
      return {11'h0, |nin, ref_ovf(alu_fn(c), a_operand(c), sh, r[15:0]), r[15], r[16], r[15:0] == 0};
    endfunction

    // one clock edge
    function void step(chip_ctrl_t c, logic [7:0] pin, logic [15:0] din, logic [15:0] ext);
      logic [15:0] bus, st, n_cond, n_sh, n_d;
      logic [7:0]  n_nin;
      logic        act, n_nout;
      bus = ibus(c, ext);
      st  = status(c);
      act = active(c);
      n_cond = cond; n_sh = sh; n_d = d; n_nin = nin; n_nout = nout;
      if (c.cond_op == COND_BUS) n_cond = bus;
      else if (c.cond_op == COND_STATUS) n_cond = st;
      if (act && c.nin_load) n_nin = pin & (c.nin_local ? cond[7:0] : c.nin_mask);
      if (act && c.b_we) b[c.b_local ? cond[9:8] : c.b_waddr] = sh;
      if (act) case (c.sh_op)
        SH_LOAD:  n_sh = bus;
        SH_LEFT:  n_sh = sh << 1;
        SH_RIGHT: n_sh = sh >> 1;
        default: ;
      endcase
      if (act && c.nout_load) n_nout = bus[0];
      if (c.d_op == D_SHIFT) n_d = din;
      else if (c.d_op == D_LOAD && act) n_d = bus;
      cond = n_cond; sh = n_sh; d = n_d; nin = n_nin; nout = n_nout;
    endfunction
  endclass

  class pe_ref;
    chip_ref     pr, cp;
    logic [15:0] mem [];
    logic [15:0] latch;
    logic [2:0]  et, eb;
    int unsigned words;

    function new(int unsigned nwords);
      words = nwords;
      pr = new(); cp = new();
      mem = new[nwords];
      latch = 0; et = 0; eb = 0;
    endfunction

    function logic [15:0] addr();
      return latch % words;
    endfunction

    function void buses(array_ctrl_t c, output logic [15:0] ab, output logic [15:0] db);
      logic [15:0] al, dl;
      case (c.pe.abus_src)
        AB_GLOBAL: al = c.gaddr;
        AB_COPROC: al = cp.wdata(c.coproc);
        default:   al = 0;
      endcase
      case (c.pe.dbus_src)
        DB_RAM:  dl = mem[addr()];
        DB_PROC: dl = pr.wdata(c.proc);
        default: dl = 0;
      endcase
      ab = (c.pe.abus_src == AB_XCVR) ? dl : al;
      db = (c.pe.dbus_src == DB_XCVR) ? al : dl;
    endfunction

    function void step(array_ctrl_t c, logic pl, logic prr, logic [15:0] pin_r, logic [15:0] cin_l);
      logic [15:0] ab, db;
      logic        pact;
      buses(c, ab, db);
      pact = pr.active(c.proc);
      if (c.pe.ram_we && pact) mem[addr()] = db;
      if (c.pe.latch_ld) latch = ab;
      pr.step(c.proc, {eb, et, prr, pl}, pin_r, db);
      cp.step(c.coproc, 8'h0, cin_l, ab);
      if (c.pe.edge_top_ld) et = db[2:0];
      if (c.pe.edge_bot_ld) eb = db[2:0];
    endfunction
  endclass
endpackage
