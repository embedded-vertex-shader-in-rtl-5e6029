// tb_mesh_workload: the point-rendering workload of the co-processor, run
// on the full-size design: a mesh of NVERT vertices (20000, the largest mesh
// size of the original measurements) is shaded in batches of THREADS
// vertices that share one program. The shader is the one the measurements
// used: transform the position by a 4x4 matrix and light the vertex from a
// directional light. In scalar ALU operations that is four dot4 for the
// position, one dot4 for n.l (with the light vector negated by inv bits) and
// three slt for the clamped colour max(0, n.l) * colour, eight results per
// vertex. The vertices are generated on a sphere-like surface, since the mesh
// itself is not available here.
//
// The list scheduler and reference model are those of tb_vertex_shader_top.
// Every output of every vertex is compared bit for bit, every run must take
// prog_last + 3 busy cycles, and the testbench reports the ALU cycles per
// vertex and the cycles per batch including the CPU transfers.
module tb_mesh_workload;
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

  localparam int THREADS = 16;
  localparam int NVERT   = 20000;
  localparam int BATCHES = (NVERT + THREADS - 1) / THREADS;
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
    repeat (6000000) @(posedge clk);
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
  localparam int M = 0, L = 16, ONE = 20, ZERO = 21, COLR = 28;
  function automatic int tb_base(int th); return 32 + 16 * th; endfunction
  localparam int V = 0, N = 4, D = 8;

  initial begin
    logic [127:0] q;
    int b, o, busy_cycles;
    int alu_cycles = 0, vertices = 0;
    longint t_begin;
    foreach (ready[i]) ready[i] = 0;
    foreach (rows[i]) rows[i] = '0;
    foreach (result_used[i]) result_used[i] = 1'b0;
    foreach (field_used[i, k]) field_used[i][k] = 1'b0;
    foreach (shadow[i]) shadow[i] = '0;
    foreach (cnt_sel[i]) cnt_sel[i] = 0;

    // Build the program: thread th uses registers tb_base(th).. and outputs 8*th..
    for (int th = 0; th < THREADS; th++) begin
      b = tb_base(th); o = 8 * th;
      for (int k = 0; k < 4; k++)
        add(K_DOT4, M+4*k, b+V, M+4*k+1, b+V+1, M+4*k+2, b+V+2, M+4*k+3, b+V+3, 8'h00, -1, o+k);
      add(K_DOT4, b+N, L, b+N+1, L+1, b+N+2, L+2, b+N+3, L+3, 8'hAA, b+D, -1);
      for (int k = 0; k < 3; k++)
        add(K_SLT, b+D, ONE, ZERO, ZERO, ZERO, ZERO, b+D, COLR+k, 8'h00, -1, o+4+k);
    end
    $display("program: %0d operations in %0d rows", nops, prog_last + 1);

    // Constants: matrix, light direction (negated in the program), colour.
    for (int i = 0; i < 12; i++) shadow[M+i] = rnd(-2.0, 2.0);
    shadow[M+12] = rnd(-0.2, 0.2); shadow[M+13] = rnd(-0.2, 0.2);
    shadow[M+14] = rnd(0.05, 0.2); shadow[M+15] = rnd(1.5, 2.5);
    for (int i = 0; i < 3; i++) shadow[L+i] = rnd(-1.0, 1.0);
    shadow[L+3] = 32'd0;
    shadow[ONE] = flt(1.0); shadow[ZERO] = 32'd0;
    for (int i = 0; i < 3; i++) shadow[COLR+i] = rnd(0.2, 1.0);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int r = 0; r <= prog_last; r++) begin
      set_page(4'(r >> 5));
      xfer(1'b1, SP_INSTR, 5'(r), rows[r], q);
    end
    for (int v = 0; v < 8; v++) write_vector(v);

    t_begin = $time;
    for (int bt = 0; bt < BATCHES; bt++) begin
      // Vertices on a bumpy closed surface; the normal is the radial direction.
      for (int th = 0; th < THREADS; th++) begin
        real dx, dy, dz, len, rad;
        b  = tb_base(th);
        dx = f2r(rnd(-1.0, 1.0)); dy = f2r(rnd(-1.0, 1.0)); dz = f2r(rnd(-1.0, 1.0));
        len = $sqrt(dx * dx + dy * dy + dz * dz) + 1.0e-3;
        rad = 0.8 + 0.2 * f2r(rnd(0.0, 1.0));
        shadow[b+V]   = flt(rad * dx / len);
        shadow[b+V+1] = flt(rad * dy / len);
        shadow[b+V+2] = flt(rad * dz / len);
        shadow[b+V+3] = flt(1.0);
        shadow[b+N]   = flt(dx / len);
        shadow[b+N+1] = flt(dy / len);
        shadow[b+N+2] = flt(dz / len);
        shadow[b+N+3] = 32'd0;
        write_vector(b / 4);
        write_vector(b / 4 + 1);
      end
      run_reference();

      xfer(1'b1, SP_CTRL, CTRL_START, 128'(prog_last), q);
      busy_cycles = 0;
      @(negedge clk);
      while (busy) begin
        busy_cycles++;
        @(negedge clk);
      end
      alu_cycles += busy_cycles;
      check(busy_cycles == prog_last + 3,
            $sformatf("run took %0d busy cycles, want %0d", busy_cycles, prog_last + 3));

      set_page(4'd0);
      for (int v = 0; v < 2 * THREADS; v++) begin
        xfer(1'b0, SP_OUT, 5'(v), '0, q);
        if (bt * THREADS + v / 2 < NVERT) begin
          for (int k = 0; k < 4; k++) if (out_used[4*v+k])
            check(q[32*k +: 32] == expect_out[4*v+k],
                  $sformatf("batch %0d output %0d: got %h want %h", bt, 4*v+k, q[32*k +: 32], expect_out[4*v+k]));
          if (v % 2 == 1) vertices++;
        end
      end
    end

    check(vertices == NVERT, $sformatf("%0d vertices shaded, want %0d", vertices, NVERT));
    check(cnt_sel[K_DOT4] > 0 && cnt_sel[K_SLT] > 0 && cnt_inv > 0 && cnt_page > 0, "mechanisms");
    $display("%0d vertices in %0d batches: %0d ALU cycles (%0d per batch, %0.2f per vertex)",
             vertices, BATCHES, alu_cycles, prog_last + 3, real'(alu_cycles) / real'(vertices));
    $display("cycles including the CPU transfers of this testbench: %0d",
             ($time - t_begin) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
