// gc_top_tb_body.svh: shared body of the end-to-end collector testbenches.
//
// Included inside a testbench module that has already instantiated the
// collector as `dut` on the signals declared here (clk, rst_n, go, r, root,
// avl, flip, mem_*, state) and that provides the watchdog. See tb_gc_top for
// what the test does.
  localparam int N_OBJ   = 1500;   // objects in the random heap
  localparam int N_ROOTS = 8;
  localparam int N_GC    = 3;     // back-to-back collections

  always #5 clk = ~clk;

  gc_mem_model u_mem (
    .clk, .addr(mem_addr), .space(mem_space), .re(mem_re), .we(mem_we),
    .wdata(mem_wdata), .rdata(mem_rdata)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  `include "gc_ref_model.svh"

  // ---------------- random heap ----------------
  addr_t obj_addr [N_OBJ];
  tag_t  obj_kind [N_OBJ];
  localparam addr_t FIXED_AREA = 24'hC0_0000;   // unmoved byte vectors live here

  function automatic content_t rand_ref();
    int k;
    int sel;
    sel = $urandom_range(0, 9);
    if (sel < 8) begin
      k = $urandom_range(0, N_OBJ - 1);
      return mk(obj_kind[k], obj_addr[k]);
    end else if (sel < 9) begin
      return mk(TAG_FBVEC, FIXED_AREA + addr_t'($urandom_range(0, 15)));
    end else begin
      return mk(TAG_FIXNUM, addr_t'($urandom));
    end
  endfunction

  task automatic build_heap(output content_t root_w);
    addr_t p;
    int len, bytes, kind;
    p = 24'h7F_F800;                 // heap straddles 0x800000: carries reach the top chip
    for (int i = 0; i < N_OBJ; i++) begin
      obj_addr[i] = p;
      kind = $urandom_range(0, 2);
      case (kind)
        0: begin obj_kind[i] = TAG_PAIR; p += 2; end
        1: begin obj_kind[i] = TAG_VEC;  len = $urandom_range(0, 5); p += addr_t'(len + 1);
                 rmem[key(1'b0, obj_addr[i])] = mk(TAG_VEC_HEAD, addr_t'(len)); end
        default: begin
                 obj_kind[i] = TAG_BVEC; bytes = $urandom_range(0, 13);
                 rmem[key(1'b0, obj_addr[i])] = mk(TAG_BVEC_HEAD, addr_t'(bytes));
                 p += btow(addr_t'(bytes)) + 1;
                 for (int w = 1; w <= int'(btow(addr_t'(bytes))); w++)
                   rmem[key(1'b0, obj_addr[i] + addr_t'(w))] = content_t'($urandom);
               end
      endcase
    end
    // fill the pointer fields now that every object has an address
    for (int i = 0; i < N_OBJ; i++) begin
      if (obj_kind[i] == TAG_PAIR) begin
        rmem[key(1'b0, obj_addr[i])]     = rand_ref();
        rmem[key(1'b0, obj_addr[i] + 1)] = rand_ref();
      end else if (obj_kind[i] == TAG_VEC) begin
        for (int w = 1; w <= int'(rmem[key(1'b0, obj_addr[i])].ptr); w++)
          rmem[key(1'b0, obj_addr[i] + addr_t'(w))] = rand_ref();
      end
    end
    for (int w = 0; w < 16; w++) rmem[key(1'b0, FIXED_AREA + addr_t'(w))] = mk(TAG_FIXNUM, addr_t'(w));
    // root vector
    check(p < FIXED_AREA, "random heap fits below the fixed area");
    rmem[key(1'b0, p)] = mk(TAG_VEC_HEAD, addr_t'(N_ROOTS));
    for (int w = 1; w <= N_ROOTS; w++) rmem[key(1'b0, p + addr_t'(w))] = rand_ref();
    rmem[key(1'b0, p + 1)] = mk(obj_kind[0], obj_addr[0]);          // make sure some live data
    root_w = mk(TAG_VEC, p);
  endtask

  // ---------------- DUT-side mechanism counters ----------------
  int d_flip, d_idle_wait, d_vloop, d_bloop, d_bvh, d_type_fbvec, d_pair2_2;
  gc_state_e prev;
  always @(posedge clk) if (rst_n) begin
    prev <= state;
    if (state == S_IDLE && !go) d_idle_wait++;
    if (state == S_DRIVER && dut.u_control.ctrl.flip) d_flip++;
    if (state == S_VLOOP_WR) d_vloop++;
    if (state == S_BLOOP_WR) d_bloop++;
    if (state == S_NEXT_BVH) d_bvh++;
    if (state == S_PAIR2_2) d_pair2_2++;
    if (prev == S_TYPE && state == S_DRIVER) d_type_fbvec++;
    // memory rule of the serialized design: at most one access per cycle
    if (mem_re && mem_we) begin failures++; $display("FAIL: read and write in one cycle"); end
  end

  initial begin : main
    content_t root_w;
    addr_t a_exp;
    longint exp_cyc, cyc;
    int nkeys;
    root = '0;
    rflip = 1'b0;
    build_heap(root_w);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // load the heap once reset has settled the collector
    u_mem.mem.delete();
    foreach (rmem[k]) u_mem.mem[k] = rmem[k];
    repeat (3) @(posedge clk);
    check(r == 1'b1, "r high in idle");
    for (int g = 0; g < N_GC; g++) begin
      exp_cyc = ref_gc(root_w, a_exp);
      @(negedge clk);
      root = root_w;
      go = 1'b1;
      cyc = 0;
      @(posedge clk);
      #1;
      check(r == 1'b0, "r falls when go is taken");
      do begin
        cyc++;
        @(posedge clk);
        #1;
      end while (state != S_SHOW_AVL);
      check(cyc == exp_cyc, $sformatf("cycles %0d expected %0d", cyc, exp_cyc));
      check(r == 1'b1, "r high when done");
      check(avl == a_exp, $sformatf("avl %0h expected %0h", avl, a_exp));
      check(flip == rflip, "flip follows the reference");
      repeat (3) @(posedge clk);
      #1;
      check(state == S_SHOW_AVL, "holds in show-avl while go is high");
      // compare every word either side has
      nkeys = 0;
      foreach (rmem[k]) begin
        nkeys++;
        check(u_mem.mem.exists(k) && u_mem.mem[k] == rmem[k],
              $sformatf("gc %0d word %0h: got %0h expected %0h", g, k,
                        u_mem.mem.exists(k) ? u_mem.mem[k] : '0, rmem[k]));
      end
      foreach (u_mem.mem[k]) if (!rmem.exists(k)) check(1'b0, $sformatf("stray write %0h", k));
      $display("gc %0d: %0d cycles, %0d live words, %0d memory words compared", g, cyc, a_exp, nkeys);
      @(negedge clk);
      go = 1'b0;
      repeat (2) @(posedge clk);
      #1;
      check(state == S_IDLE && r == 1'b1, "back to idle");
      root_w = mk(TAG_VEC, '0);      // the copied root vector sits at word 0
    end
    $display("pair %0d vec %0d bvec %0d fwd %0d fbvec %0d bvh %0d imm %0d vloop %0d bloop %0d",
             n_pair, n_vec, n_bvec, n_fwd, n_fbvec, n_bvh, n_imm, n_vloop, n_bloop);
    $display("dut: flip %0d idle_wait %0d vloop %0d bloop %0d bvh %0d pair2.2 %0d type_skip %0d",
             d_flip, d_idle_wait, d_vloop, d_bloop, d_bvh, d_pair2_2, d_type_fbvec);
    check(n_pair > 0,  "pair copy occurred");
    check(n_vec > 0,   "vector copy occurred");
    check(n_bvec > 0,  "byte vector copy occurred");
    check(n_fwd > 0,   "forwarded pointer occurred");
    check(n_fbvec > 0, "unmoved byte vector pointer occurred");
    check(n_imm > 0,   "immediate skipped");
    check(d_bvh > 0 && d_bvh == n_bvh, "byte vector body skipped");
    check(d_vloop > 0 && d_vloop == n_vloop, "vector loop iterations");
    check(d_bloop > 0 && d_bloop == n_bloop, "byte vector loop iterations");
    check(d_flip == N_GC, "semispace flip per collection");
    check(d_idle_wait > 0, "idle wait");
    check(d_pair2_2 == n_pair, "PAIR2.2 once per pair");
    check(d_type_fbvec == n_fbvec, "fbvec skip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

