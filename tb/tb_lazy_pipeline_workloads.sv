// tb_lazy_pipeline_workloads: the three evaluation kernels on the core at
// its default parameters.
//
// The core has no memory, branches or flags, so this testbench acts as
// its front end. It walks each kernel in SystemVerilog and emits the
// instruction trace that a compiled loop would send to the execution units:
//  * a load becomes a move of the loaded value, after a two-cycle gap that
//    stands for the memory access;
//  * a compare-and-branch becomes nothing: the testbench follows the taken
//    path, decided from its reference register values;
//  * a store becomes nothing: the testbench updates its own memory.
// Arithmetic runs on the core. Marking instructions put the data
// arithmetic in imprecise regions and the control values (step sizes,
// indices, checksums) in precise ones, as a programmer would mark them.
// Kernels:
//  1. JPEG: the integer "islow" 8-point IDCT (even and odd parts, libjpeg
//     constants, results before the final descale) on two rows;
//  2. ADPCM: the IMA ADPCM encoder on 24 samples of a random walk;
//  3. SOR: two Gauss-Seidel sweeps with omega = 1.25 over the interior of
//     a 5 x 5 binary32 grid; an exact checksum of every new grid value is
//     kept in a precise register.
// Checks:
//  * at checkpoints, once the core is idle, all 16 registers equal a
//    sequential interpreter of the emitted trace;
//  * the trace computes the kernel: the IDCT outputs, the ADPCM state and
//    codes, and the SOR grid equal plain SystemVerilog models of the
//    algorithms;
//  * imprecise issue happens in every kernel; Lazy Forwarding and Lazy
//    Writeback each happen at least once.
// The use of each imprecise result is reported: at the nominal end, by
// Lazy Forwarding, or by Lazy Writeback.
module tb_lazy_pipeline_workloads;
  import lp_pkg::*;
  import fp32_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic      in_valid, in_ready, idle;
  instr_t    in_instr;
  reg_idx_t  dbg_raddr;
  word_t     dbg_rdata;
  prec_t     cur_prec;
  fu_state_e fu_state [NFU];
  logic      ev_issue, ev_issue_imp, ev_stall_fu, ev_stall_raw;
  logic [1:0] ev_fwd_nominal, ev_fwd_lazy;
  slack_t    ev_fwd_slack;
  logic      ev_wb [NFU];
  slack_t    ev_wb_slack [NFU];
  logic      ev_wb_masked [NFU];
  logic      ev_evict_issue [NFU];
  logic      ev_evict_limit [NFU];
  logic [NFU-1:0] ev_stale_wb;

  lazy_pipeline_top dut (.*);

  typedef word_t regs_t [NREGS];

  // ---------------- trace and interpreter ----------------
  instr_t prog [$];
  int     gap  [$];
  int     ckpt [$];      // index into snaps, or -1
  regs_t  snaps [$];
  int     kernel_of [$]; // kernel number of each entry
  word_t  ref_regs [NREGS];
  bit     cur_imp;
  int     cur_kernel;

  function automatic word_t alu_ref(alu_op_e o, word_t x, word_t z);
    case (o)
      OP_ADD: return x + z;
      OP_SUB: return x - z;
      OP_RSB: return z - x;
      OP_AND: return x & z;
      OP_ORR: return x | z;
      OP_EOR: return x ^ z;
      OP_MOV: return z;
      OP_LSL: return x << z[4:0];
      OP_LSR: return x >> z[4:0];
      default: return '0;
    endcase
  endfunction

  word_t  exp_a [$], exp_b [$];   // operands of each arithmetic instruction
  bit     exp_a_used [$];         // a mov has no first operand

  task automatic emit(instr_t i, int g = 0);
    word_t b;
    b = i.use_imm ? i.imm : ref_regs[i.rs2];
    if (is_arith_kind(i.kind)) begin
      exp_a.push_back(ref_regs[i.rs1]);
      exp_a_used.push_back(!(i.kind == K_ALU && i.op == OP_MOV));
      exp_b.push_back(b);
    end
    case (i.kind)
      K_ALU:  ref_regs[i.rd] = alu_ref(i.op, ref_regs[i.rs1], b);
      K_MUL:  ref_regs[i.rd] = ref_regs[i.rs1] * b;
      K_FADD: ref_regs[i.rd] = fadd_ref(ref_regs[i.rs1], b, i.op == OP_SUB);
      K_FMUL: ref_regs[i.rd] = fmul_ref(ref_regs[i.rs1], b);
      K_FDIV: ref_regs[i.rd] = fdiv_ref(ref_regs[i.rs1], b);
      default: ;
    endcase
    prog.push_back(i);
    gap.push_back(g);
    ckpt.push_back(-1);
    kernel_of.push_back(cur_kernel);
  endtask

  task automatic rr(kind_e k, alu_op_e o, int rd, int rs1, int rs2);
    instr_t i;
    i = '0; i.kind = k; i.op = o;
    i.rd = reg_idx_t'(rd); i.rs1 = reg_idx_t'(rs1); i.rs2 = reg_idx_t'(rs2);
    emit(i);
  endtask

  task automatic ri(kind_e k, alu_op_e o, int rd, int rs1, word_t imm);
    instr_t i;
    i = '0; i.kind = k; i.op = o; i.use_imm = 1'b1; i.imm = imm;
    i.rd = reg_idx_t'(rd); i.rs1 = reg_idx_t'(rs1);
    emit(i);
  endtask

  // a load: precise move of the loaded value after the memory latency
  task automatic load(int rd, word_t v);
    instr_t i;
    precision(1'b0);
    i = '0; i.kind = K_ALU; i.op = OP_MOV; i.use_imm = 1'b1; i.imm = v;
    i.rd = reg_idx_t'(rd);
    emit(i, 2);
  endtask

  // marking instruction, only where the level changes
  task automatic precision(bit imp);
    instr_t i;
    if (imp == cur_imp) return;
    cur_imp = imp;
    i = '0;
    i.kind = imp ? K_START_IMP : K_START_PRE;
    i.prec = imp ? prec_t'(3'b111) : '0;
    emit(i);
  endtask

  task automatic checkpoint();
    ckpt[$] = snaps.size();
    snaps.push_back(ref_regs);
  endtask

  // ---------------- kernel 1: islow IDCT rows ----------------
  localparam int NROWS = 2;
  int    idct_in  [NROWS][8];
  word_t idct_out [NROWS][8];

  function automatic void idct_model(int in [8], ref word_t o [8]);
    int z1, z2, z3, z4, z5, t0, t1, t2, t3, t10, t11, t12, t13;
    z1 = (in[2] + in[6]) * 4433;
    t2 = z1 + in[6] * -15137;
    t3 = z1 + in[2] * 6270;
    t0 = (in[0] + in[4]) <<< 13;
    t1 = (in[0] - in[4]) <<< 13;
    t10 = t0 + t3; t13 = t0 - t3; t11 = t1 + t2; t12 = t1 - t2;
    t0 = in[7]; t1 = in[5]; t2 = in[3]; t3 = in[1];
    z1 = t0 + t3; z2 = t1 + t2; z3 = t0 + t2; z4 = t1 + t3;
    z5 = (z3 + z4) * 9633;
    t0 = t0 * 2446; t1 = t1 * 16819; t2 = t2 * 25172; t3 = t3 * 12299;
    z1 = z1 * -7373; z2 = z2 * -20995; z3 = z3 * -16069; z4 = z4 * -3196;
    z3 = z3 + z5; z4 = z4 + z5;
    t0 = t0 + z1 + z3; t1 = t1 + z2 + z4; t2 = t2 + z2 + z3; t3 = t3 + z1 + z4;
    o[0] = t10 + t3; o[7] = t10 - t3;
    o[1] = t11 + t2; o[6] = t11 - t2;
    o[2] = t12 + t1; o[5] = t12 - t1;
    o[3] = t13 + t0; o[4] = t13 - t0;
  endfunction

  task automatic gen_idct();
    cur_kernel = 0;
    for (int r = 0; r < NROWS; r++) begin
      for (int k = 0; k < 8; k++) begin
        idct_in[r][k] = $urandom_range(0, 1023) - 512;
        if (k > 2 && $urandom_range(0, 1) == 0) idct_in[r][k] = 0;
        load(k, word_t'(idct_in[r][k]));
      end
      precision(1'b1);
      // even part
      rr(K_ALU, OP_ADD, 8, 2, 6);
      ri(K_MUL, OP_ADD, 8, 8, 32'd4433);          // z1
      ri(K_MUL, OP_ADD, 9, 6, -32'sd15137);
      rr(K_ALU, OP_ADD, 9, 8, 9);                 // tmp2
      ri(K_MUL, OP_ADD, 10, 2, 32'd6270);
      rr(K_ALU, OP_ADD, 10, 8, 10);               // tmp3
      rr(K_ALU, OP_ADD, 11, 0, 4);
      ri(K_ALU, OP_LSL, 11, 11, 32'd13);          // tmp0
      rr(K_ALU, OP_SUB, 12, 0, 4);
      ri(K_ALU, OP_LSL, 12, 12, 32'd13);          // tmp1
      rr(K_ALU, OP_ADD, 13, 11, 10);              // tmp10
      rr(K_ALU, OP_SUB, 11, 11, 10);              // tmp13
      rr(K_ALU, OP_ADD, 10, 12, 9);               // tmp11
      rr(K_ALU, OP_SUB, 12, 12, 9);               // tmp12
      // odd part: tmp0..3 = in7, in5, in3, in1 in r7, r5, r3, r1
      rr(K_ALU, OP_ADD, 0, 7, 1);                 // z1
      rr(K_ALU, OP_ADD, 2, 5, 3);                 // z2
      rr(K_ALU, OP_ADD, 4, 7, 3);                 // z3
      rr(K_ALU, OP_ADD, 6, 5, 1);                 // z4
      rr(K_ALU, OP_ADD, 8, 4, 6);
      ri(K_MUL, OP_ADD, 8, 8, 32'd9633);          // z5
      ri(K_MUL, OP_ADD, 7, 7, 32'd2446);
      ri(K_MUL, OP_ADD, 5, 5, 32'd16819);
      ri(K_MUL, OP_ADD, 3, 3, 32'd25172);
      ri(K_MUL, OP_ADD, 1, 1, 32'd12299);
      ri(K_MUL, OP_ADD, 0, 0, -32'sd7373);
      ri(K_MUL, OP_ADD, 2, 2, -32'sd20995);
      ri(K_MUL, OP_ADD, 4, 4, -32'sd16069);
      ri(K_MUL, OP_ADD, 6, 6, -32'sd3196);
      rr(K_ALU, OP_ADD, 4, 4, 8);
      rr(K_ALU, OP_ADD, 6, 6, 8);
      rr(K_ALU, OP_ADD, 9, 0, 4);  rr(K_ALU, OP_ADD, 7, 7, 9);   // tmp0
      rr(K_ALU, OP_ADD, 9, 2, 6);  rr(K_ALU, OP_ADD, 5, 5, 9);   // tmp1
      rr(K_ALU, OP_ADD, 9, 2, 4);  rr(K_ALU, OP_ADD, 3, 3, 9);   // tmp2
      rr(K_ALU, OP_ADD, 9, 0, 6);  rr(K_ALU, OP_ADD, 1, 1, 9);   // tmp3
      // outputs
      rr(K_ALU, OP_ADD, 0, 13, 1);   // o0
      rr(K_ALU, OP_SUB, 2, 13, 1);   // o7
      rr(K_ALU, OP_ADD, 4, 10, 3);   // o1
      rr(K_ALU, OP_SUB, 6, 10, 3);   // o6
      rr(K_ALU, OP_ADD, 8, 12, 5);   // o2
      rr(K_ALU, OP_SUB, 9, 12, 5);   // o5
      rr(K_ALU, OP_ADD, 14, 11, 7);  // o3
      rr(K_ALU, OP_SUB, 15, 11, 7);  // o4
      precision(1'b0);
      checkpoint();
      idct_out[r] = '{ref_regs[0], ref_regs[4], ref_regs[8], ref_regs[14],
                      ref_regs[15], ref_regs[9], ref_regs[6], ref_regs[2]};
    end
  endtask

  // ---------------- kernel 2: IMA ADPCM encoder ----------------
  localparam int NSAMP = 24;
  localparam int STEP_TAB [89] = '{
    7, 8, 9, 10, 11, 12, 13, 14, 16, 17, 19, 21, 23, 25, 28, 31, 34, 37,
    41, 45, 50, 55, 60, 66, 73, 80, 88, 97, 107, 118, 130, 143, 157, 173,
    190, 209, 230, 253, 279, 307, 337, 371, 408, 449, 494, 544, 598, 658,
    724, 796, 876, 963, 1060, 1166, 1282, 1411, 1552, 1707, 1878, 2066,
    2272, 2499, 2749, 3024, 3327, 3660, 4026, 4428, 4871, 5358, 5894, 6484,
    7132, 7845, 8630, 9493, 10442, 11487, 12635, 13899, 15289, 16818,
    18500, 20350, 22385, 24623, 27086, 29794, 32767};
  localparam int INDEX_TAB [16] = '{-1, -1, -1, -1, 2, 4, 6, 8,
                                    -1, -1, -1, -1, 2, 4, 6, 8};
  int samples [NSAMP];
  int adpcm_valpred, adpcm_index;
  logic [31:0] adpcm_codes;

  function automatic void adpcm_model(output int valpred, output int index,
                                      output logic [31:0] codes);
    int step, diff, vpdiff, delta, sign;
    valpred = 0; index = 0; step = STEP_TAB[0]; codes = '0;
    for (int n = 0; n < NSAMP; n++) begin
      diff = samples[n] - valpred;
      sign = (diff < 0) ? 8 : 0;
      if (sign != 0) diff = -diff;
      delta = 0;
      vpdiff = step >> 3;
      if (diff >= step) begin delta = 4; diff -= step; vpdiff += step; end
      step = step >> 1;
      if (diff >= step) begin delta |= 2; diff -= step; vpdiff += step; end
      step = step >> 1;
      if (diff >= step) begin delta |= 1; vpdiff += step; end
      if (sign != 0) valpred -= vpdiff; else valpred += vpdiff;
      if (valpred > 32767) valpred = 32767;
      else if (valpred < -32768) valpred = -32768;
      delta |= sign;
      index += INDEX_TAB[delta];
      if (index < 0) index = 0;
      if (index > 88) index = 88;
      step = STEP_TAB[index];
      codes = (codes << 4) | 32'(delta);
    end
  endfunction

  // registers: r1 val, r2 valpred, r3 diff, r4 step, r5 vpdiff, r6 delta,
  // r7 index, r8 sign, r9 table value, r10 packed codes
  task automatic gen_adpcm();
    int v;
    cur_kernel = 1;
    v = 0;
    for (int n = 0; n < NSAMP; n++) begin
      v += $urandom_range(0, 3000) - 1500;
      if (v > 20000) v = 20000;
      if (v < -20000) v = -20000;
      samples[n] = v;
    end
    precision(1'b0);
    ri(K_ALU, OP_MOV, 2, 0, 32'd0);
    ri(K_ALU, OP_MOV, 7, 0, 32'd0);
    ri(K_ALU, OP_MOV, 4, 0, 32'(STEP_TAB[0]));
    ri(K_ALU, OP_MOV, 10, 0, 32'd0);
    for (int n = 0; n < NSAMP; n++) begin
      load(1, word_t'(samples[n]));
      precision(1'b1);
      rr(K_ALU, OP_SUB, 3, 1, 2);                           // diff
      if ($signed(ref_regs[3]) < 0) begin
        precision(1'b0); ri(K_ALU, OP_MOV, 8, 0, 32'd8);
        precision(1'b1); ri(K_ALU, OP_RSB, 3, 3, 32'd0);    // diff = -diff
      end else begin
        precision(1'b0); ri(K_ALU, OP_MOV, 8, 0, 32'd0);
      end
      precision(1'b0);
      ri(K_ALU, OP_MOV, 6, 0, 32'd0);
      precision(1'b1);
      ri(K_ALU, OP_LSR, 5, 4, 32'd3);                       // vpdiff
      for (int bitn = 2; bitn >= 0; bitn--) begin
        if ($signed(ref_regs[3]) >= $signed(ref_regs[4])) begin
          precision(1'b0);
          ri(K_ALU, OP_ORR, 6, 6, 32'd1 << bitn);
          precision(1'b1);
          if (bitn != 0) rr(K_ALU, OP_SUB, 3, 3, 4);
          rr(K_ALU, OP_ADD, 5, 5, 4);
        end
        if (bitn != 0) begin
          precision(1'b0);
          ri(K_ALU, OP_LSR, 4, 4, 32'd1);
        end
      end
      precision(1'b1);
      if (ref_regs[8] != 0) rr(K_ALU, OP_SUB, 2, 2, 5);
      else                  rr(K_ALU, OP_ADD, 2, 2, 5);
      precision(1'b0);
      if ($signed(ref_regs[2]) > 32767)       ri(K_ALU, OP_MOV, 2, 0, 32'd32767);
      else if ($signed(ref_regs[2]) < -32768) ri(K_ALU, OP_MOV, 2, 0, -32'sd32768);
      rr(K_ALU, OP_ORR, 6, 6, 8);
      load(9, word_t'(INDEX_TAB[ref_regs[6][3:0]]));
      rr(K_ALU, OP_ADD, 7, 7, 9);
      if ($signed(ref_regs[7]) < 0)  ri(K_ALU, OP_MOV, 7, 0, 32'd0);
      if ($signed(ref_regs[7]) > 88) ri(K_ALU, OP_MOV, 7, 0, 32'd88);
      load(4, word_t'(STEP_TAB[ref_regs[7]]));
      ri(K_ALU, OP_LSL, 10, 10, 32'd4);
      rr(K_ALU, OP_ORR, 10, 10, 6);
      if (n % 6 == 5) checkpoint();
    end
    adpcm_valpred = int'(ref_regs[2]);
    adpcm_index   = int'(ref_regs[7]);
    adpcm_codes   = ref_regs[10];
  endtask

  // ---------------- kernel 3: SOR sweeps ----------------
  localparam int GN = 5;
  localparam int SWEEPS = 2;
  localparam word_t OMEGA_4     = 32'h3EA0_0000;  // 1.25 / 4
  localparam word_t ONE_M_OMEGA = 32'hBE80_0000;  // 1 - 1.25
  word_t grid [GN][GN];      // memory as the trace leaves it
  word_t grid_ref [GN][GN];  // plain model

  task automatic gen_sor();
    cur_kernel = 2;
    for (int i = 0; i < GN; i++) for (int j = 0; j < GN; j++) begin
      grid[i][j] = r2f(real'($urandom_range(0, 2000)) / 100.0);
      grid_ref[i][j] = grid[i][j];
    end
    precision(1'b0);
    ri(K_ALU, OP_MOV, 6, 0, OMEGA_4);
    ri(K_ALU, OP_MOV, 7, 0, ONE_M_OMEGA);
    ri(K_ALU, OP_MOV, 11, 0, 32'd0);
    for (int s = 0; s < SWEEPS; s++) begin
      for (int i = 1; i < GN - 1; i++) for (int j = 1; j < GN - 1; j++) begin
        load(1, grid[i-1][j]);
        load(2, grid[i+1][j]);
        load(3, grid[i][j-1]);
        load(4, grid[i][j+1]);
        load(5, grid[i][j]);
        precision(1'b1);
        rr(K_FADD, OP_ADD, 8, 1, 2);
        rr(K_FADD, OP_ADD, 9, 3, 4);
        rr(K_FADD, OP_ADD, 8, 8, 9);
        rr(K_FMUL, OP_ADD, 8, 8, 6);
        rr(K_FMUL, OP_ADD, 9, 5, 7);
        rr(K_FADD, OP_ADD, 10, 8, 9);
        precision(1'b0);
        rr(K_ALU, OP_EOR, 11, 11, 10);    // checksum of every new value
        grid[i][j] = ref_regs[10];        // store
        // plain model of the same update
        grid_ref[i][j] = fadd_ref(
            fmul_ref(fadd_ref(fadd_ref(grid_ref[i-1][j], grid_ref[i+1][j], 1'b0),
                              fadd_ref(grid_ref[i][j-1], grid_ref[i][j+1], 1'b0),
                              1'b0), OMEGA_4),
            fmul_ref(grid_ref[i][j], ONE_M_OMEGA), 1'b0);
      end
      checkpoint();
    end
  endtask

  // ---------------- event counters per kernel ----------------
  int k_now;
  int n_imp [3], n_nom [3], n_lfw [3], n_lwb [3], n_zero_wb [3];
  always @(posedge clk) if (rst_n && k_now >= 0) begin
    if (ev_issue_imp) n_imp[k_now]++;
    n_lfw[k_now] += $countones(ev_fwd_lazy);
    for (int f = 1; f < NFU; f += 2) if (ev_wb[f]) begin
      if (ev_wb_slack[f] != 0) n_lwb[k_now]++;
      else                     n_zero_wb[k_now]++;
    end
    n_nom[k_now] += $countones(ev_fwd_nominal);
  end

  // every issued instruction gets the interpreter's operands
  int n_issued = 0;
  always @(posedge clk) if (rst_n && ev_issue) begin
    word_t ea, eb;
    ea = exp_a[n_issued];
    eb = exp_b[n_issued];
    checks++;
    if (dut.iss_b !== eb || (dut.iss_a !== ea && exp_a_used[n_issued])) begin
      failures++;
      if (failures < 20)
        $display("FAIL operands of issued instruction %0d: got %h %h expected %h %h",
                 n_issued, dut.iss_a, dut.iss_b, ea, eb);
    end
    n_issued++;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s_used;
    string names [3] = '{"JPEG idct", "ADPCM enc", "SOR"};
    k_now = -1;
    in_valid = 1'b0; in_instr = '0; dbg_raddr = '0;
    foreach (ref_regs[r]) ref_regs[r] = '0;
    cur_imp = 1'b0;
    gen_idct();
    gen_adpcm();
    gen_sor();

    // the trace computes the kernels
    for (int r = 0; r < NROWS; r++) begin
      word_t o [8];
      idct_model(idct_in[r], o);
      for (int k = 0; k < 8; k++)
        chk($sformatf("idct row %0d out %0d", r, k), idct_out[r][k], o[k]);
    end
    begin
      int vp, ix;
      logic [31:0] cd;
      adpcm_model(vp, ix, cd);
      chk("adpcm valpred", adpcm_valpred, vp);
      chk("adpcm index", adpcm_index, ix);
      chk("adpcm codes", adpcm_codes, cd);
    end
    for (int i = 0; i < GN; i++) for (int j = 0; j < GN; j++)
      chk($sformatf("sor grid %0d,%0d", i, j), grid[i][j], grid_ref[i][j]);

    // run the trace on the core
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (prog[n]) begin
      k_now = kernel_of[n];
      in_valid = 1'b0;
      repeat (gap[n]) @(negedge clk);
      in_valid = 1'b1;
      in_instr = prog[n];
      forever begin
        logic acc;
        #1 acc = in_ready;
        @(negedge clk);
        if (acc) break;
      end
      in_valid = 1'b0;
      if (ckpt[n] >= 0) begin
        int wait_cyc;
        wait_cyc = 0;
        while (!idle && wait_cyc < 100) begin
          @(negedge clk);
          wait_cyc++;
        end
        for (int r = 0; r < NREGS; r++) begin
          dbg_raddr = reg_idx_t'(r);
          #1 chk($sformatf("checkpoint %0d r%0d", ckpt[n], r), dbg_rdata,
                 snaps[ckpt[n]][r]);
        end
        @(negedge clk);
      end
    end
    @(negedge clk);
    k_now = -1;

    s_used = 0;
    for (int k = 0; k < 3; k++) begin
      $display("%s: imprecise issues %0d, reads at nominal end %0d, lazy forwards %0d, imprecise write-backs with slack %0d / without %0d",
               names[k], n_imp[k], n_nom[k], n_lfw[k], n_lwb[k], n_zero_wb[k]);
      checks++;
      if (n_imp[k] == 0) begin
        failures++;
        $display("FAIL %s: no imprecise issue", names[k]);
      end
      s_used += n_lfw[k];
    end
    checks++;
    if (s_used == 0 || n_lwb[0] + n_lwb[1] + n_lwb[2] == 0) begin
      failures++;
      $display("FAIL Lazy Forwarding or Lazy Writeback never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
