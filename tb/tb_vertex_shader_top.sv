// tb_vertex_shader_top: end-to-end test of the co-processor at its default
// size, driven as the host CPU would drive it.
//
// The workload is a vertex shader of the kind the co-processor was built for:
// per vertex, transform the position by a 4x4 matrix (four dot4), compute the
// diffuse term of a directional light (dot4 with inverted light components,
// then max(0, n.l) * colour by slt), project (two div), scale to screen
// coordinates (two dot2) and round to pixels (two float2int), normalise the
// x component of the normal with rsq plus one Newton step (mult4 and a dot2
// with an inverted input, then mult2), and convert the vertex id with
// int2float. Four vertices (threads) share one program.
//
// A small list scheduler in this testbench does what the offline shader
// converter does: it places each scalar operation in the first instruction
// row where its sources have been written (a result stored by row r can be
// read from row r+2), its input fields are free and the row that falls its
// delay later has no result yet; slt also claims the e..h fields five rows
// later. Expected values come from a reference model that executes the same
// operations in program order with independent binary32 arithmetic.
//
// Two batches are run. The first register write of batch 2 is issued while
// batch 1 runs and must be held until the run ends. Checks: every output
// bit-exact, the run takes prog_last + 3 busy cycles, and every mechanism
// (each of the nine ALU commands, sign inversion, write-back, output writes,
// page switching, a held CPU write) happens at least once.
module tb_vertex_shader_top;
  import vs_pkg::*;
  import fp_ref_pkg::*;

  typedef enum int {K_DOT4, K_DOT2, K_MULT4, K_MULT2, K_DIV, K_RSQ, K_SLT, K_I2F, K_F2I} kind_e;
  typedef struct {
    kind_e     kind;
    int        src [8];
    logic [7:0] inv;
    int        dst;     // -1: none
    int        out;     // -1: none
    int        issue;
  } op_t;

  localparam int THREADS = 4;
  localparam int BATCHES = 2;
  localparam int MAXOPS  = 200;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         cpu_req = 1'b0, cpu_wr = 1'b0;
  fcm_space_e   cpu_space = SP_CTRL;
  logic [4:0]   cpu_addr = '0;
  logic [127:0] cpu_wdata = '0, cpu_rdata;
  logic         cpu_ack, busy;

  vertex_shader_top dut (.*);

  always #5 clk = ~clk;

  op_t          ops [MAXOPS];
  int           nops = 0;
  logic [127:0] rows [512];
  bit           field_used [512][8];
  bit           result_used [512];
  int           ready [512];
  logic [31:0]  shadow [512];
  logic [31:0]  expect_out [512];
  bit           out_used [512];
  int           prog_last = 0;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int cnt_sel [9];
  int cnt_inv = 0, cnt_we = 0, cnt_oe = 0, cnt_page = 0, cnt_held = 0;

  always @(posedge clk) if (dut.ctrl.we || dut.ctrl.oe) begin
    if (dut.ctrl.sel.dot4)  cnt_sel[K_DOT4]++;
    if (dut.ctrl.sel.dot2)  cnt_sel[K_DOT2]++;
    if (dut.ctrl.sel.mult4) cnt_sel[K_MULT4]++;
    if (dut.ctrl.sel.mult2) cnt_sel[K_MULT2]++;
    if (dut.ctrl.sel.div)   cnt_sel[K_DIV]++;
    if (dut.ctrl.sel.rsq)   cnt_sel[K_RSQ]++;
    if (dut.ctrl.sel.slt)   cnt_sel[K_SLT]++;
    if (dut.ctrl.sel.i2f)   cnt_sel[K_I2F]++;
    if (dut.ctrl.sel.f2i)   cnt_sel[K_F2I]++;
    if (dut.ctrl.inv != '0) cnt_inv++;
    if (dut.ctrl.we)        cnt_we++;
    if (dut.ctrl.oe)        cnt_oe++;
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- scheduler
  function automatic int lat(kind_e k);
    case (k)
      K_DOT4: return 19;  K_DOT2: return 14;  K_MULT4: return 18;
      K_MULT2: return 9;  K_DIV: return 27;   K_RSQ: return 2;
      K_SLT: return 14;   default: return 6;  // int2float, float2int
    endcase
  endfunction

  function automatic logic [7:0] fields(kind_e k);
    case (k)
      K_DOT4, K_SLT:   return 8'hFF;
      K_DOT2, K_MULT4: return 8'h0F;
      K_MULT2, K_DIV:  return 8'h03;
      default:         return 8'h01;
    endcase
  endfunction

  // Set a bit field of row r: word w, lowest bit lo, width n.
  function automatic void put(int r, int w, int lo, int n, int v);
    for (int i = 0; i < n; i++) rows[r][32*w + lo + i] = v[i];
  endfunction

  function automatic void sel_bit(int r, kind_e k);
    case (k)
      K_DIV:   put(r, 2, 27, 1, 1);  K_RSQ:  put(r, 2, 28, 1, 1);
      K_SLT:   put(r, 2, 29, 1, 1);  K_MULT2: put(r, 2, 30, 1, 1);
      K_DOT2:  put(r, 2, 31, 1, 1);  K_F2I:  put(r, 3, 27, 1, 1);
      K_I2F:   put(r, 3, 28, 1, 1);  K_MULT4: put(r, 3, 29, 1, 1);
      default: put(r, 3, 30, 1, 1);  // dot4
    endcase
  endfunction

  function automatic void place_operands(int r, op_t o, logic [7:0] m);
    for (int k = 0; k < 8; k++) if (m[k]) begin
      field_used[r][k] = 1'b1;
      put(r, k / 2, (k % 2) ? 9 : 0, 9, o.src[k]);
      put(r, k / 4, 28 + (k % 4), 1, int'(o.inv[k]));   // inv0..3 in cmd0, inv4..7 in cmd1
    end
  endfunction

  function automatic void schedule(ref op_t o);
    logic [7:0] m;
    int t, r;
    bit ok;
    m = fields(o.kind);
    t = 0;
    for (int k = 0; k < 8; k++) if (m[k] && ready[o.src[k]] > t) t = ready[o.src[k]];
    forever begin
      ok = !result_used[t + lat(o.kind)];
      for (int k = 0; k < 8; k++) if (m[k] && field_used[t][k]) ok = 0;
      if (o.kind == K_SLT) for (int k = 4; k < 8; k++) if (field_used[t + 5][k]) ok = 0;
      if (ok) break;
      t++;
    end
    o.issue = t;
    place_operands(t, o, m);
    if (o.kind == K_SLT) place_operands(t + 5, o, 8'hF0);
    r = t + lat(o.kind);
    result_used[r] = 1'b1;
    sel_bit(r, o.kind);
    if (o.dst >= 0) begin
      put(r, 0, 18, 9, o.dst); put(r, 0, 27, 1, 1);
      ready[o.dst] = r + 2;
    end
    if (o.out >= 0) begin
      put(r, 1, 18, 9, o.out); put(r, 1, 27, 1, 1);
    end
    if (r > prog_last) prog_last = r;
  endfunction

  function automatic void add(kind_e k, int s0, int s1, int s2, int s3, int s4, int s5,
                              int s6, int s7, logic [7:0] inv, int dst, int out);
    op_t o;
    o.kind = k;
    o.src = '{s0, s1, s2, s3, s4, s5, s6, s7};
    o.inv = inv; o.dst = dst; o.out = out; o.issue = 0;
    schedule(o);
    ops[nops++] = o;
  endfunction

  // ----------------------------------------------------------------- reference
  function automatic void run_reference();
    logic [31:0] x [8], y;
    foreach (out_used[i]) out_used[i] = 1'b0;
    for (int i = 0; i < nops; i++) begin
      for (int k = 0; k < 8; k++) x[k] = {shadow[ops[i].src[k]][31] ^ ops[i].inv[k], shadow[ops[i].src[k]][30:0]};
      case (ops[i].kind)
        K_DOT4:  y = fadd(fadd(fmul(x[0], x[1]), fmul(x[2], x[3])), fadd(fmul(x[4], x[5]), fmul(x[6], x[7])));
        K_DOT2:  y = fadd(fmul(x[0], x[1]), fmul(x[2], x[3]));
        K_MULT4: y = fmul(fmul(x[0], x[1]), fmul(x[2], x[3]));
        K_MULT2: y = fmul(x[0], x[1]);
        K_DIV:   y = fdiv(x[0], x[1]);
        K_RSQ:   y = 32'h5F37_59DF - (x[0] >> 1);
        K_SLT:   y = (f2r(fadd(fmul(x[0], x[1]), fmul(x[2], x[3]))) < 0.0) ? fmul(x[4], x[5]) : fmul(x[6], x[7]);
        K_I2F:   y = i2f(x[0]);
        default: y = f2i(x[0]);
      endcase
      if (ops[i].dst >= 0) shadow[ops[i].dst] = y;
      if (ops[i].out >= 0) begin
        expect_out[ops[i].out] = y;
        out_used[ops[i].out]   = 1'b1;
      end
    end
  endfunction

  // ----------------------------------------------------------------- CPU side
  logic [3:0] cur_page = '0;

  task automatic xfer(input bit w, input fcm_space_e sp, input logic [4:0] a,
                      input logic [127:0] d, output logic [127:0] q);
    @(negedge clk);
    cpu_req = 1'b1; cpu_wr = w; cpu_space = sp; cpu_addr = a; cpu_wdata = d;
    @(negedge clk);
    cpu_req = 1'b0;
    while (!cpu_ack) @(negedge clk);
    q = cpu_rdata;
  endtask

  task automatic set_page(input logic [3:0] p);
    logic [127:0] q;
    if (p != cur_page) begin
      xfer(1'b1, SP_CTRL, CTRL_PAGE, 128'(p), q);
      cur_page = p;
      cnt_page++;
    end
  endtask

  task automatic write_vector(input int v);   // 4D vector v = scalars 4v..4v+3
    logic [127:0] q;
    set_page(4'(v >> 5));
    xfer(1'b1, SP_REGS, 5'(v), {shadow[4*v+3], shadow[4*v+2], shadow[4*v+1], shadow[4*v]}, q);
  endtask

  function automatic logic [31:0] rnd(real lo, real hi);
    return flt(lo + (hi - lo) * real'($urandom_range(0, 100000)) / 100000.0);
  endfunction

  // Register map (scalar addresses).
  localparam int M = 0, L = 16, ONE = 20, ZERO = 21, C15 = 22, C05 = 23;
  localparam int SX = 24, OX = 25, SY = 26, OY = 27;
  function automatic int tb_base(int th); return 64 + 64 * th; endfunction
  localparam int V = 0, N = 4, COL = 8, ID = 11, P = 16, D = 20, X = 21, Y = 22;
  localparam int SXT = 23, SYT = 24, NN = 25, R0 = 26, T = 27, R1 = 28;

  initial begin
    logic [127:0] q;
    int b, o, busy_cycles;
    foreach (ready[i]) ready[i] = 0;
    foreach (rows[i]) rows[i] = '0;
    foreach (result_used[i]) result_used[i] = 1'b0;
    foreach (field_used[i, k]) field_used[i][k] = 1'b0;
    foreach (shadow[i]) shadow[i] = '0;
    foreach (cnt_sel[i]) cnt_sel[i] = 0;

    // Build the program: thread th uses registers tb_base(th).. and outputs 16*th..
    for (int th = 0; th < THREADS; th++) begin
      b = tb_base(th); o = 16 * th;
      for (int k = 0; k < 4; k++)
        add(K_DOT4, M+4*k, b+V, M+4*k+1, b+V+1, M+4*k+2, b+V+2, M+4*k+3, b+V+3, 8'h00, b+P+k, o+k);
      add(K_DOT4, b+N, L, b+N+1, L+1, b+N+2, L+2, b+N+3, L+3, 8'hAA, b+D, -1);
      for (int k = 0; k < 3; k++)
        add(K_SLT, b+D, ONE, ZERO, ZERO, ZERO, ZERO, b+D, b+COL+k, 8'h00, -1, o+4+k);
      add(K_DIV, b+P, b+P+3, 0, 0, 0, 0, 0, 0, 8'h00, b+X, -1);
      add(K_DIV, b+P+1, b+P+3, 0, 0, 0, 0, 0, 0, 8'h00, b+Y, -1);
      add(K_DOT2, b+X, SX, ONE, OX, 0, 0, 0, 0, 8'h00, b+SXT, -1);
      add(K_DOT2, b+Y, SY, ONE, OY, 0, 0, 0, 0, 8'h00, b+SYT, -1);
      add(K_F2I, b+SXT, 0, 0, 0, 0, 0, 0, 0, 8'h00, -1, o+7);
      add(K_F2I, b+SYT, 0, 0, 0, 0, 0, 0, 0, 8'h00, -1, o+8);
      add(K_DOT4, b+N, b+N, b+N+1, b+N+1, b+N+2, b+N+2, b+N+3, b+N+3, 8'h00, b+NN, -1);
      add(K_RSQ, b+NN, 0, 0, 0, 0, 0, 0, 0, 8'h00, b+R0, -1);
      add(K_MULT4, b+NN, b+R0, b+R0, b+R0, 0, 0, 0, 0, 8'h00, b+T, -1);
      add(K_DOT2, b+R0, C15, b+T, C05, 0, 0, 0, 0, 8'h08, b+R1, o+9);
      add(K_MULT2, b+N, b+R1, 0, 0, 0, 0, 0, 0, 8'h00, -1, o+10);
      add(K_I2F, b+ID, 0, 0, 0, 0, 0, 0, 0, 8'h00, -1, o+11);
    end
    $display("program: %0d operations in %0d rows", nops, prog_last + 1);

    // Constants.
    for (int i = 0; i < 12; i++) shadow[M+i] = rnd(-2.0, 2.0);
    shadow[M+12] = rnd(-0.2, 0.2); shadow[M+13] = rnd(-0.2, 0.2);
    shadow[M+14] = rnd(0.05, 0.2); shadow[M+15] = rnd(1.5, 2.5);   // w row keeps w > 1
    for (int i = 0; i < 3; i++) shadow[L+i] = rnd(-1.0, 1.0);
    shadow[L+3] = 32'd0;
    shadow[ONE] = flt(1.0); shadow[ZERO] = 32'd0; shadow[C15] = flt(1.5); shadow[C05] = flt(0.5);
    shadow[SX] = flt(320.0); shadow[OX] = flt(320.0); shadow[SY] = flt(-240.0); shadow[OY] = flt(240.0);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Load the program and the constants.
    for (int r = 0; r <= prog_last; r++) begin
      set_page(4'(r >> 5));
      xfer(1'b1, SP_INSTR, 5'(r), rows[r], q);
    end
    for (int v = 0; v < 7; v++) write_vector(v);

    for (int bt = 0; bt < BATCHES; bt++) begin
      // Per-vertex inputs of this batch.
      for (int th = 0; th < THREADS; th++) begin
        b = tb_base(th);
        if (bt == 0 || th != 0)   // thread 0's position of a later batch is loaded early
          for (int i = 0; i < 3; i++) shadow[b+V+i] = rnd(-1.0, 1.0);
        shadow[b+V+3] = flt(1.0);
        for (int i = 0; i < 3; i++) shadow[b+N+i] = rnd(-1.0, 1.0);
        shadow[b+N+3] = 32'd0;
        for (int i = 0; i < 3; i++) shadow[b+COL+i] = rnd(0.0, 1.0);
        shadow[b+ID] = 32'(bt * THREADS + th);
      end
      if (bt == 0) begin
        for (int th = 0; th < THREADS; th++)
          for (int v = 0; v < 3; v++) write_vector(tb_base(th) / 4 + v);
      end else begin
        // Vector 0 of thread 0 was written while the previous run was busy.
        for (int th = 0; th < THREADS; th++)
          for (int v = 0; v < 3; v++) if (th != 0 || v != 0) write_vector(tb_base(th) / 4 + v);
      end
      run_reference();

      // Start the run and measure it.
      xfer(1'b1, SP_CTRL, CTRL_START, 128'(prog_last), q);
      busy_cycles = 0;
      fork
        begin
          @(negedge clk);   // start takes effect at the next edge
          while (busy) begin
            busy_cycles++;
            @(negedge clk);
          end
        end
        if (bt + 1 < BATCHES) begin
          // Next batch's first vector, issued while busy: held until idle.
          b = tb_base(0);
          for (int i = 0; i < 3; i++) shadow[b+V+i] = rnd(-1.0, 1.0);
          write_vector(b / 4);
          if (!busy) cnt_held++;
        end
      join
      check(busy_cycles == prog_last + 3,
            $sformatf("run took %0d busy cycles, want %0d", busy_cycles, prog_last + 3));
      xfer(1'b0, SP_CTRL, CTRL_STATUS, '0, q);
      check(q[0] == 1'b0, "status idle after the run");

      // Read back and compare.
      set_page(4'd0);
      for (int v = 0; v < 16; v++) begin
        xfer(1'b0, SP_OUT, 5'(v), '0, q);
        for (int k = 0; k < 4; k++) if (out_used[4*v+k]) begin
          check(q[32*k +: 32] == expect_out[4*v+k],
                $sformatf("batch %0d output %0d: got %h want %h", bt, 4*v+k, q[32*k +: 32], expect_out[4*v+k]));
        end
      end
    end

    // Every mechanism must have happened.
    for (int k = 0; k < 9; k++) begin
      $display("command %0d selected %0d times", k, cnt_sel[k]);
      check(cnt_sel[k] > 0, $sformatf("ALU command %0d never selected", k));
    end
    $display("inversions %0d, write-backs %0d, output writes %0d, page switches %0d, held writes %0d",
             cnt_inv, cnt_we, cnt_oe, cnt_page, cnt_held);
    check(cnt_inv > 0, "no sign inversion");
    check(cnt_we > 0, "no write-back");
    check(cnt_oe > 0, "no output write");
    check(cnt_page > 0, "no page switch");
    check(cnt_held > 0, "no CPU write held during a run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
