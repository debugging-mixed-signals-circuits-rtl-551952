// Self-checking testbench of the one-bit comparator cdr_cell.
// Checks (1) the scan behaviour of its boundary cell (shift, capture,
// update on the falling edge, output multiplexer) and (2) block F: the full
// truth table of the =A operation as given for the design, and, for the other
// operations, the transitions expected from the meaning of each partial
// result code (decided, equal so far, above A / below B so far).
`timescale 1ns/1ps
module tb_cdr_cell;
  import cdd_pkg::*;

  logic tck = 1'b0, trst_n = 1'b0;
  logic capture = 0, shift = 0, update = 0, mode = 0, si = 0, pi = 0;
  logic so, po;
  cond_op_t op = OP_EQ;
  cmp_code_t i_code = Q_TRUE, q_code;
  int checks = 0, failures = 0;

  cdr_cell dut (.*);

  always #5 tck = ~tck;

  initial begin
    #20000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [2:0] got, logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // load C/S = cs and U = u through the scan path
  task automatic load(logic cs, logic u);
    @(negedge tck); shift = 1; si = u;
    @(negedge tck); shift = 0; update = 1;   // U <- u on this falling edge
    @(posedge tck); @(negedge tck); update = 0;
    shift = 1; si = cs;
    @(negedge tck); shift = 0;
  endtask

  // expected result of F, written from the meaning of the codes
  function automatic cmp_code_t ref_f(cmp_code_t i, cond_op_t o, logic cs, logic u, logic p);
    if (o inside {OP_EQ, OP_NE}) begin
      if (i != Q_TRUE) return Q_FALSE;
      if (cs == 1'b0)  return Q_TRUE;        // masked bit
      return (p == u) ? Q_TRUE : Q_FALSE;
    end
    if (i == Q_TRUE)  return Q_TRUE;
    if (i == Q_FALSE) return Q_FALSE;
    if (o inside {OP_GT, OP_GE, OP_LT, OP_LE}) begin
      if (i != Q_EQ) return Q_FALSE;
      if (p == u) return Q_EQ;
      if (o inside {OP_GT, OP_GE}) return (p > u) ? Q_TRUE : Q_FALSE;
      return (p < u) ? Q_TRUE : Q_FALSE;
    end
    // range: relation to A (u) and to B (cs) of the prefix
    begin
      int ra, rb;        // -1 below, 0 equal, +1 above
      ra = (i == Q_GTA) ? 1 : 0;
      rb = (i == Q_LTB) ? -1 : 0;
      if (ra == 0) ra = (p > u) ? 1 : (p < u) ? -1 : 0;
      if (rb == 0) rb = (p > cs) ? 1 : (p < cs) ? -1 : 0;
      if (ra < 0 || rb > 0) return Q_FALSE;
      if (ra > 0 && rb < 0) return Q_TRUE;
      if (ra > 0) return Q_GTA;
      if (rb < 0) return Q_LTB;
      return Q_EQ;
    end
  endfunction

  initial begin
    #12 trst_n = 1'b1;

    // ---- scan cell behaviour ----
    load(1'b1, 1'b0);
    chk("so after shift", so, 1'b1);
    mode = 1; #1 chk("po from U", po, 1'b0);
    mode = 0; pi = 1; #1 chk("po from PI", po, 1'b1);
    @(negedge tck); capture = 1; pi = 0;
    @(negedge tck); capture = 0;
    chk("capture PI", so, 1'b0);
    mode = 1; #1 chk("U unchanged by capture", po, 1'b0);
    mode = 0;

    // ---- =A truth table (the design's table) ----
    // rows: I, C/S, U, PI -> Q
    begin
      logic [3:0] rows [6];
      cmp_code_t  qexp [6];
      rows[0] = 4'b0_000; qexp[0] = Q_FALSE;   // I = F
      rows[1] = 4'b1_000; qexp[1] = Q_TRUE;    // I = T, mask 0
      rows[2] = 4'b1_100; qexp[2] = Q_TRUE;
      rows[3] = 4'b1_101; qexp[3] = Q_FALSE;
      rows[4] = 4'b1_110; qexp[4] = Q_FALSE;
      rows[5] = 4'b1_111; qexp[5] = Q_TRUE;
      op = OP_EQ;
      for (int r = 0; r < 6; r++) begin
        for (int x = 0; x < 4; x++) begin   // don't-care columns swept
          logic cs, u;
          cs = rows[r][2]; u = rows[r][1];
          if (r == 0) begin cs = x[0]; u = x[1]; end
          if (r == 1) u = x[0];
          load(cs, u);
          i_code = rows[r][3] ? Q_TRUE : Q_FALSE;
          pi = (r <= 1) ? x[1] : rows[r][0];
          #1 chk($sformatf("=A row %0d", r), q_code, qexp[r]);
        end
      end
    end

    // ---- every operation, code, stored pair and input bit ----
    for (int cu = 0; cu < 4; cu++) begin
      load(cu[1], cu[0]);
      for (int o = 0; o < 8; o++)
        for (int ic = 0; ic < 5; ic++)
          for (int p = 0; p < 2; p++) begin
            op = cond_op_t'(o); i_code = cmp_code_t'(ic); pi = p[0];
            #1 chk($sformatf("op%0d i%0d cs%0d u%0d pi%0d", o, ic, cu[1], cu[0], p),
                   q_code, ref_f(i_code, op, cu[1], cu[0], pi));
          end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
