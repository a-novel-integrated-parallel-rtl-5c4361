// sat_prog_pkg: test support for running join-free parallel unit propagation on the
// accelerator.
//
// It holds (1) a tiny two-pass RISC-V assembler that builds the thread code, (2) the two
// thread routines of the unit-propagation workload, each split into a TRS prologue
// (lui/add/lw only, ended by trs_halt) and a TEU body (ended by teu_halt), (3) a random
// CNF generator with the memory image it implies, and (4) a serial reference unit
// propagation that gives the expected verdict and assignment.
//
// Memory image (byte addresses, all words):
//   VAL_BASE  + 4*v  value of variable v: bit0 = TRUE, bit1 = FALSE, 0 = unassigned
//   CNT_BASE  + 4*L  number of clauses holding the variable of literal L
//   PTR_BASE  + 4*L  address of that variable's clause list (array of clause addresses)
//   clause C: C+0 satisfied flag, C+4 literals not yet false, C+8 length n, C+12.. literals
// A literal is L = 2*v + s, s = 1 for a negated variable. Both literals of a variable
// share one clause list, so that a TRS can index the tables by L with adds only.
//
// Threads (seed = literal L that has just become TRUE):
//   PROPAGATE(L):   TRS loads the clause count; TEU spawns that many ELIM_RESOLVE(L).
//   ELIM_RESOLVE(L) thread i: TRS fetches clause C = list[i], its length and flag; TEU
//     marks C satisfied if it holds L, else atomically counts one more false literal;
//     0 left -> conflict; 1 left -> find the last non-false literal V, claim its variable
//     with amoor and spawn PROPAGATE(V), or report a conflict if V's variable is
//     already assigned the other way.
package sat_prog_pkg;

  localparam int unsigned VAL_BASE    = 32'h0001_0000;
  localparam int unsigned CNT_BASE    = 32'h0002_0000;
  localparam int unsigned PTR_BASE    = 32'h0003_0000;
  localparam int unsigned LIST_BASE   = 32'h0004_0000;
  localparam int unsigned CLAUSE_BASE = 32'h0008_0000;
  localparam int unsigned MAX_LEN     = 4;

  // ------------------------------------------------------------ instruction encoders
  function automatic logic [31:0] enc_r(int f7, int rs2, int rs1, int f3, int rd, int opc);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic logic [31:0] enc_i(int imm, int rs1, int f3, int rd, int opc);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic logic [31:0] enc_s(int imm, int rs2, int rs1, int f3, int opc);
    logic [11:0] i;
    i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:0], 7'(opc)};
  endfunction
  function automatic logic [31:0] enc_b(int off, int rs2, int rs1, int f3);
    logic [12:0] i;
    i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_j(int off, int rd);
    logic [20:0] i;
    i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction

  // Two-pass assembler: run the program builder twice; pass 0 only records labels.
  class asm_t;
    logic [31:0] code[$];
    int          lbl[string];
    bit          final_pass;

    function void label(string n);
      lbl[n] = code.size() * 4;
    endfunction
    function int at(string n);
      if (final_pass && !lbl.exists(n)) $fatal(1, "undefined label %s", n);
      return lbl.exists(n) ? lbl[n] : 0;
    endfunction
    function void w(logic [31:0] x); code.push_back(x); endfunction
    function int here(); return code.size() * 4; endfunction

    function void lui(int rd, int imm20);   w({20'(imm20), 5'(rd), 7'b0110111}); endfunction
    function void add(int rd, int a, int b); w(enc_r(0, b, a, 0, rd, 7'b0110011)); endfunction
    function void and_(int rd, int a, int b); w(enc_r(0, b, a, 7, rd, 7'b0110011)); endfunction
    function void srl(int rd, int a, int b); w(enc_r(0, b, a, 5, rd, 7'b0110011)); endfunction
    function void sll(int rd, int a, int b); w(enc_r(0, b, a, 1, rd, 7'b0110011)); endfunction
    function void addi(int rd, int a, int imm); w(enc_i(imm, a, 0, rd, 7'b0010011)); endfunction
    function void andi(int rd, int a, int imm); w(enc_i(imm, a, 7, rd, 7'b0010011)); endfunction
    function void slli(int rd, int a, int sh); w(enc_i(sh, a, 1, rd, 7'b0010011)); endfunction
    function void srli(int rd, int a, int sh); w(enc_i(sh, a, 5, rd, 7'b0010011)); endfunction
    function void lw(int rd, int imm, int a); w(enc_i(imm, a, 2, rd, 7'b0000011)); endfunction
    function void sw(int rs, int imm, int a); w(enc_s(imm, rs, a, 2, 7'b0100011)); endfunction
    function void br(int f3, int a, int b, string n); w(enc_b(at(n) - here(), b, a, f3)); endfunction
    function void j(string n); w(enc_j(at(n) - here(), 0)); endfunction
    // amo<op>.w rd, rs2, (rs1)
    function void amo(int f5, int rd, int rs2, int rs1);
      w(enc_r(f5 << 2, rs2, rs1, 2, rd, 7'b0101111));
    endfunction
    function void spawn(int rs_seed, int rs_cnt, string n);
      w(enc_s(at(n), rs_cnt, rs_seed, 0, 7'b0001011));
    endfunction
    function void trs_halt(); w(enc_i(0, 0, 1, 0, 7'b0001011)); endfunction
    function void teu_halt(); w(enc_i(0, 0, 2, 0, 7'b0001011)); endfunction
  endclass

  // Register names
  localparam int ZERO = 0, T0 = 5, T1 = 6, T2 = 7, S0 = 8, S1 = 9, A0 = 10, A1 = 11,
                 A2 = 12, A3 = 13, A4 = 14, A5 = 15, S2 = 18, S3 = 19, S4 = 20, S5 = 21,
                 S6 = 22, S7 = 23, T3 = 28, T4 = 29, T5 = 30;

  function automatic void build_program(asm_t a);
    // ---------------- PROPAGATE(L): a0 = L
    a.label("prop");
    a.add(T0, A0, A0);            // 2L
    a.add(T0, T0, T0);            // 4L
    a.lui(T1, CNT_BASE >> 12);
    a.add(T1, T1, T0);
    a.lw(A2, 0, T1);              // clause count
    a.trs_halt();
    a.br(0, A2, ZERO, "prop_end"); // beq a2, x0
    a.spawn(A0, A2, "er");
    a.label("prop_end");
    a.teu_halt();

    // ---------------- ELIM_RESOLVE(L), thread id a1
    a.label("er");
    a.add(T0, A0, A0);
    a.add(T0, T0, T0);            // 4L
    a.lui(T1, PTR_BASE >> 12);
    a.add(T1, T1, T0);
    a.lw(T1, 0, T1);              // clause list
    a.add(T2, A1, A1);
    a.add(T2, T2, T2);            // 4*tid
    a.add(T1, T1, T2);
    a.lw(A2, 0, T1);              // clause address C
    a.lw(A3, 8, A2);              // length n
    a.lw(A4, 0, A2);              // satisfied flag
    a.trs_halt();
    // TEU body
    a.br(1, A4, ZERO, "halt");    // already satisfied
    a.addi(T0, A2, 12);           // p = first literal
    a.slli(T1, A3, 2);
    a.add(T1, T0, T1);            // end
    a.label("scan");
    a.br(7, T0, T1, "resolve");   // bgeu p, end
    a.lw(T2, 0, T0);
    a.br(0, T2, A0, "sat");       // clause holds L
    a.addi(T0, T0, 4);
    a.j("scan");
    a.label("sat");
    a.addi(T3, ZERO, 1);
    a.sw(T3, 0, A2);              // mark satisfied
    a.j("halt");
    a.label("resolve");           // clause holds not-L: one more false literal
    a.addi(T3, ZERO, -1);
    a.addi(T5, A2, 4);
    a.amo(5'b00000, T4, T3, T5);  // amoadd: t4 = old count
    a.addi(T4, T4, -1);
    a.br(0, T4, ZERO, "conflict");
    a.addi(T3, ZERO, 1);
    a.br(1, T4, T3, "halt");      // more than one literal left
    a.addi(T0, A2, 12);
    a.label("find");
    a.br(7, T0, T1, "halt");
    a.lw(T2, 0, T0);              // V
    a.srli(S0, T2, 1);
    a.slli(S0, S0, 2);
    a.lui(S1, VAL_BASE >> 12);
    a.add(S0, S0, S1);            // &value[var(V)]
    a.lw(S1, 0, S0);
    a.andi(S2, T2, 1);            // sign
    a.addi(S3, ZERO, 2);
    a.srl(S3, S3, S2);            // value bit meaning "V is false"
    a.addi(S5, ZERO, 1);
    a.sll(S5, S5, S2);            // value bit meaning "V is true"
    a.and_(S4, S1, S3);
    a.br(1, S4, ZERO, "next");    // V false: keep looking
    a.and_(S4, S1, S5);
    a.br(1, S4, ZERO, "halt");    // V true: clause satisfied
    a.amo(5'b01000, S6, S5, S0);  // amoor: claim V
    a.and_(S4, S6, S3);
    a.br(1, S4, ZERO, "conflict");
    a.and_(S4, S6, S5);
    a.br(1, S4, ZERO, "halt");    // someone else already propagates V
    a.addi(S7, ZERO, 1);
    a.spawn(T2, S7, "prop");      // nested spawn
    a.j("halt");
    a.label("next");
    a.addi(T0, T0, 4);
    a.j("find");
    a.label("conflict");
    a.sw(ZERO, -4, ZERO);         // store to the conflict address
    a.label("halt");
    a.teu_halt();

    // ---------------- empty thread, used to exercise the dispatcher on its own
    a.label("nop");
    a.trs_halt();
    a.teu_halt();
  endfunction

  function automatic asm_t assemble();
    asm_t a;
    a = new();
    a.final_pass = 0;
    build_program(a);
    a.code.delete();
    a.final_pass = 1;
    build_program(a);
    return a;
  endfunction

  // ------------------------------------------------------------ CNF and reference
  class cnf_t;
    int nvars;
    int nclauses;
    int lits[$][$];     // clause -> literals
    int units[$];       // initial TRUE literals
    // memory image: address -> word
    logic [31:0] image[int unsigned];

    function void generate_cnf(int nv, int nc, int nu, int unsigned seed);
      int dummy;
      dummy = $urandom(seed);
      nvars = nv;
      nclauses = nc;
      lits.delete();
      units.delete();
      for (int c = 0; c < nc; c++) begin
        int len, q[$];
        len = 2 + ($urandom % (MAX_LEN - 1));
        q.delete();
        while (q.size() < len) begin
          int v;
          bit dup;
          v = $urandom % nv;
          dup = 0;
          foreach (q[k]) if ((q[k] >> 1) == v) dup = 1;
          if (!dup) q.push_back(2 * v + ($urandom % 2));
        end
        lits.push_back(q);
      end
      while (units.size() < nu) begin
        int v;
        bit dup;
        v = $urandom % nv;
        dup = 0;
        foreach (units[k]) if ((units[k] >> 1) == v) dup = 1;
        if (!dup) units.push_back(2 * v + ($urandom % 2));
      end
    endfunction

    function void build_image();
      int unsigned list_p, cl_p;
      int unsigned caddr[$];
      image.delete();
      caddr.delete();
      cl_p = CLAUSE_BASE;
      for (int c = 0; c < nclauses; c++) begin
        caddr.push_back(cl_p);
        image[cl_p]     = 0;
        image[cl_p + 4] = lits[c].size();
        image[cl_p + 8] = lits[c].size();
        foreach (lits[c][k]) image[cl_p + 12 + 4*k] = lits[c][k];
        cl_p += 12 + 4 * MAX_LEN;
      end
      for (int v = 0; v < nvars; v++) image[VAL_BASE + 4*v] = 0;
      foreach (units[k]) image[VAL_BASE + 4*(units[k] >> 1)] = 1 << (units[k] & 1);
      list_p = LIST_BASE;
      for (int v = 0; v < nvars; v++) begin
        int n;
        n = 0;
        for (int c = 0; c < nclauses; c++)
          foreach (lits[c][k]) if ((lits[c][k] >> 1) == v) begin
            image[list_p + 4*n] = caddr[c];
            n++;
          end
        for (int s = 0; s < 2; s++) begin
          image[CNT_BASE + 4*(2*v + s)] = n;
          image[PTR_BASE + 4*(2*v + s)] = list_p;
        end
        list_p += 4 * n;
      end
    endfunction

    // Serial unit propagation (the document's Algorithm 2). Returns 1 on conflict;
    // val[v] gets the final assignment (bit0 TRUE, bit1 FALSE).
    function bit reference(output int val[]);
      int q[$];
      val = new[nvars];
      foreach (val[v]) val[v] = 0;
      foreach (units[k]) begin
        val[units[k] >> 1] = 1 << (units[k] & 1);
        q.push_back(units[k]);
      end
      while (q.size() > 0) begin
        void'(q.pop_front());
        for (int c = 0; c < nclauses; c++) begin
          int nfalse, nfree, last;
          bit sat;
          nfalse = 0; nfree = 0; sat = 0; last = 0;
          foreach (lits[c][k]) begin
            int l, vv;
            l  = lits[c][k];
            vv = val[l >> 1];
            if (vv & (1 << (l & 1)))      sat = 1;
            else if (vv != 0)            nfalse++;
            else begin nfree++; last = l; end
          end
          if (!sat && nfree == 0) return 1;
          if (!sat && nfree == 1) begin
            val[last >> 1] = 1 << (last & 1);
            q.push_back(last);
          end
        end
      end
      return 0;
    endfunction
  endclass

endpackage
