// tb_gc_workload: the collector under a running list-processing system.
//
// The testbench plays the processor side of the machine. A mutator allocates
// pairs, vectors and byte vectors at the top of the live semispace, links them
// into the data reachable from a root vector (word 0 of the live space) and
// overwrites old references so that garbage builds up. When the next object
// would not fit below SEMI_WORDS, storage is exhausted: the mutator raises GO
// with the root {vec, 0}, waits for R, and carries on allocating from the
// address the collector shows on AVL, in the space FLIP now names. This is the
// cycle the collector was built for: run until storage is full, collect,
// return to the running system, and repeat.
//
// Every collection is checked two ways.
//   1. Against the reference model: the whole memory, AVL, FLIP and the exact
//      cycle count must match the specification run on a copy of the heap.
//   2. Semantically, without reference to the algorithm: the graph reachable
//      from the root in old space before the collection and the graph
//      reachable from the root in new space after it must be isomorphic (same
//      tags, same immediates, same byte-vector contents, same sharing and
//      cycles, unmoved byte vectors at the same address), and the objects
//      reached in new space must fill it exactly from 0 to AVL.
// The run counts collections, the mechanisms of the specification seen in
// them and the objects allocated, and fails if any never happened. The
// collector is the default 24-bit bit-slice build; the heap limit, the root
// count and the number of collections are this testbench's own choices.
module tb_gc_workload;
  import gc_pkg::*;

  localparam int    N_GC       = 12;
  localparam int    N_ROOTS    = 16;
  localparam addr_t SEMI_WORDS = 24'd3000;          // mutator's storage limit per semispace
  localparam addr_t FIXED_AREA = 24'hC0_0000;       // unmoved byte vectors live here

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0, r;
  content_t root;
  addr_t avl;
  logic flip;
  addr_t mem_addr;
  logic mem_space, mem_re, mem_we;
  content_t mem_wdata, mem_rdata;
  gc_state_e state;
  int checks = 0, failures = 0;

  gc_top dut (.*);

  always #5 clk = ~clk;

  gc_mem_model u_mem (
    .clk, .addr(mem_addr), .space(mem_space), .re(mem_re), .we(mem_we),
    .wdata(mem_wdata), .rdata(mem_rdata)
  );

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  `include "gc_ref_model.svh"

  // ---------------- mutator ----------------
  addr_t    fp;          // next free word of the live space
  content_t last_obj;    // most recently allocated object
  int n_alloc, n_drop, n_store_field;

  function automatic content_t lrd(addr_t a);
    return u_mem.mem.exists(key(flip, a)) ? u_mem.mem[key(flip, a)] : '0;
  endfunction

  function automatic void lwr(addr_t a, content_t c);
    u_mem.mem[key(flip, a)] = c;
  endfunction

  // A reachable pair or vector, found by a short random walk from the root.
  function automatic content_t walk();
    content_t cur, nxt;
    addr_t len;
    int steps;
    cur = mk(TAG_VEC, '0);
    steps = $urandom_range(0, 5);
    for (int s = 0; s < steps; s++) begin
      if (cur.tag == TAG_PAIR) nxt = lrd(cur.ptr + addr_t'($urandom_range(0, 1)));
      else begin
        len = lrd(cur.ptr).ptr;
        if (len == 0) break;
        nxt = lrd(cur.ptr + 1 + addr_t'($urandom_range(0, int'(len) - 1)));
      end
      if (nxt.tag != TAG_PAIR && nxt.tag != TAG_VEC) break;
      cur = nxt;
    end
    return cur;
  endfunction

  function automatic content_t field_value();
    int sel;
    content_t c;
    sel = $urandom_range(0, 9);
    if (sel < 5) begin
      c = walk();
      if (c.ptr == '0 && c.tag == TAG_VEC) c = last_obj;   // rarely point back at the root vector
      return c;
    end else if (sel < 7) return last_obj;
    else if (sel < 8) return mk(TAG_FBVEC, FIXED_AREA + addr_t'($urandom_range(0, 15)));
    else return mk(TAG_FIXNUM, addr_t'($urandom));
  endfunction

  // Address of a pointer slot that is reachable: a root slot, or a field of
  // a reachable pair or vector.
  function automatic addr_t slot();
    content_t c;
    addr_t len;
    if ($urandom_range(0, 1) == 0) return addr_t'($urandom_range(1, N_ROOTS));
    c = walk();
    if (c.tag == TAG_PAIR) return c.ptr + addr_t'($urandom_range(0, 1));
    len = lrd(c.ptr).ptr;
    if (len == 0) return addr_t'($urandom_range(1, N_ROOTS));
    return c.ptr + 1 + addr_t'($urandom_range(0, int'(len) - 1));
  endfunction

  // One mutator step. Returns 0 if the object it wanted does not fit.
  function automatic bit mutate();
    int kind, len, bytes;
    addr_t size;
    content_t obj;
    if ($urandom_range(0, 9) == 0) begin
      lwr(addr_t'($urandom_range(1, N_ROOTS)), mk(TAG_FIXNUM, addr_t'($urandom)));
      n_drop++;
      return 1'b1;
    end
    kind = $urandom_range(0, 9);
    len = $urandom_range(0, 6);
    bytes = $urandom_range(0, 17);
    size = (kind < 5) ? 2 : (kind < 8) ? addr_t'(len + 1) : btow(addr_t'(bytes)) + 1;
    if (fp + size > SEMI_WORDS) return 1'b0;
    if (kind < 5) begin
      obj = mk(TAG_PAIR, fp);
      lwr(fp, field_value());
      lwr(fp + 1, field_value());
    end else if (kind < 8) begin
      obj = mk(TAG_VEC, fp);
      lwr(fp, mk(TAG_VEC_HEAD, addr_t'(len)));
      for (int w = 1; w <= len; w++) lwr(fp + addr_t'(w), field_value());
    end else begin
      obj = mk(TAG_BVEC, fp);
      lwr(fp, mk(TAG_BVEC_HEAD, addr_t'(bytes)));
      for (int w = 1; w <= int'(btow(addr_t'(bytes))); w++) lwr(fp + addr_t'(w), content_t'($urandom));
    end
    fp += size;
    n_alloc++;
    last_obj = obj;
    lwr(slot(), obj);
    n_store_field++;
    return 1'b1;
  endfunction

  // ---------------- semantic check ----------------
  content_t snap [logic [ADDR_W:0]];   // both spaces just before the collection

  function automatic content_t srd(logic sp, addr_t a);
    return snap.exists(key(sp, a)) ? snap[key(sp, a)] : '0;
  endfunction

  function automatic content_t nrd(logic sp, addr_t a);
    return u_mem.mem.exists(key(sp, a)) ? u_mem.mem[key(sp, a)] : '0;
  endfunction

  // Walks old and new graph side by side. Returns the number of new-space
  // words the reached objects occupy.
  task automatic iso(logic osp, logic nsp, addr_t a_new, output longint words, output int bad);
    content_t qo[$], qn[$];
    addr_t seen [addr_t];
    content_t o, n, ho, hn;
    addr_t sz;
    words = 0;
    bad = 0;
    qo.push_back(mk(TAG_VEC, '0));
    qn.push_back(mk(TAG_VEC, '0));
    while (qo.size() > 0) begin
      o = qo.pop_front();
      n = qn.pop_front();
      if (o.tag != n.tag) begin bad++; continue; end
      if (!is_pointer(o.tag) || o.tag == TAG_FBVEC) begin
        if (o.ptr != n.ptr) bad++;
        continue;
      end
      if (seen.exists(o.ptr)) begin
        if (seen[o.ptr] != n.ptr) bad++;
        continue;
      end
      seen[o.ptr] = n.ptr;
      if (o.tag == TAG_PAIR) begin
        sz = 2;
        for (int i = 0; i < 2; i++) begin
          qo.push_back(srd(osp, o.ptr + addr_t'(i)));
          qn.push_back(nrd(nsp, n.ptr + addr_t'(i)));
        end
      end else begin
        ho = srd(osp, o.ptr);
        hn = nrd(nsp, n.ptr);
        if (ho != hn) begin bad++; continue; end
        if (o.tag == TAG_VEC) begin
          sz = ho.ptr + 1;
          for (int i = 1; i <= int'(ho.ptr); i++) begin
            qo.push_back(srd(osp, o.ptr + addr_t'(i)));
            qn.push_back(nrd(nsp, n.ptr + addr_t'(i)));
          end
        end else begin
          sz = btow(ho.ptr) + 1;
          for (int i = 1; i <= int'(sz) - 1; i++)
            if (srd(osp, o.ptr + addr_t'(i)) != nrd(nsp, n.ptr + addr_t'(i))) bad++;
        end
      end
      if (n.ptr + sz > a_new) bad++;
      words += longint'(sz);
    end
  endtask

  // ---------------- run ----------------
  int n_gc, n_flip_seen;
  logic flip_q;
  always @(posedge clk) if (rst_n) begin
    flip_q <= flip;
    if (flip != flip_q) n_flip_seen++;
    if (mem_re && mem_we) begin failures++; $display("FAIL: read and write in one cycle"); end
  end

  initial begin : main
    addr_t a_exp;
    longint exp_cyc, cyc, words, total_cyc, total_live;
    int bad, steps, nbad;
    logic pre_flip;
    root = '0;
    n_gc = 0; n_flip_seen = 0; n_alloc = 0; n_drop = 0; n_store_field = 0;
    total_cyc = 0; total_live = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    flip_q = flip;
    check(r == 1'b1 && state == S_IDLE, "idle after reset");
    // empty system: a root vector and the unmoved byte vectors
    u_mem.mem.delete();
    for (int w = 0; w < 16; w++) begin
      u_mem.mem[key(1'b0, FIXED_AREA + addr_t'(w))] = mk(TAG_FIXNUM, addr_t'(w));
      u_mem.mem[key(1'b1, FIXED_AREA + addr_t'(w))] = mk(TAG_FIXNUM, addr_t'(w));
    end
    lwr('0, mk(TAG_VEC_HEAD, addr_t'(N_ROOTS)));
    for (int w = 1; w <= N_ROOTS; w++) lwr(addr_t'(w), mk(TAG_FIXNUM, addr_t'(w)));
    fp = addr_t'(N_ROOTS + 1);
    last_obj = mk(TAG_FIXNUM, '0);
    while (n_gc < N_GC) begin
      // run the system until storage is exhausted
      steps = 0;
      while (mutate()) steps++;
      // collect
      snap = u_mem.mem;
      rmem = u_mem.mem;
      rflip = flip;
      pre_flip = flip;
      exp_cyc = ref_gc(mk(TAG_VEC, '0), a_exp);
      @(negedge clk);
      root = mk(TAG_VEC, '0);
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
      check(r == 1'b1, "r high when done");
      check(cyc == exp_cyc, $sformatf("gc %0d cycles %0d expected %0d", n_gc, cyc, exp_cyc));
      check(avl == a_exp, $sformatf("gc %0d avl %0h expected %0h", n_gc, avl, a_exp));
      check(flip == rflip && flip != pre_flip, "flip toggles once");
      nbad = 0;
      foreach (rmem[k]) if (!u_mem.mem.exists(k) || u_mem.mem[k] != rmem[k]) nbad++;
      foreach (u_mem.mem[k]) if (!rmem.exists(k)) nbad++;
      check(nbad == 0, $sformatf("gc %0d memory differs from the reference in %0d words", n_gc, nbad));
      iso(~flip, flip, avl, words, bad);
      check(bad == 0, $sformatf("gc %0d old and new graphs differ in %0d places", n_gc, bad));
      check(words == longint'(avl), $sformatf("gc %0d reached %0d words, avl %0d", n_gc, words, avl));
      $display("gc %0d: %0d mutator steps, heap %0d -> %0d live words, %0d cycles",
               n_gc, steps, fp, avl, cyc);
      total_cyc += cyc;
      total_live += longint'(avl);
      @(negedge clk);
      go = 1'b0;
      repeat (2) @(posedge clk);
      #1;
      check(state == S_IDLE && r == 1'b1, "back to idle");
      // return to the running system
      fp = avl;
      if (fp > SEMI_WORDS * 3 / 4)
        for (int w = 3; w <= N_ROOTS; w++) lwr(addr_t'(w), mk(TAG_FIXNUM, '0));
      n_gc++;
    end
    $display("allocated %0d objects, %0d references dropped, %0d collections, %0d flips",
             n_alloc, n_drop, n_gc, n_flip_seen);
    $display("%0d collection cycles for %0d live words copied", total_cyc, total_live);
    $display("pair %0d vec %0d bvec %0d fwd %0d fbvec %0d bvh %0d imm %0d vloop %0d bloop %0d",
             n_pair, n_vec, n_bvec, n_fwd, n_fbvec, n_bvh, n_imm, n_vloop, n_bloop);
    check(n_flip_seen == N_GC, "one flip per collection");
    check(n_alloc > 0 && n_drop > 0, "mutator allocated and dropped references");
    check(n_pair > 0,  "pair copy occurred");
    check(n_vec > 0,   "vector copy occurred");
    check(n_bvec > 0,  "byte vector copy occurred");
    check(n_fwd > 0,   "forwarded pointer occurred");
    check(n_fbvec > 0, "unmoved byte vector pointer occurred");
    check(n_imm > 0,   "immediate skipped");
    check(n_bvh > 0,   "byte vector body skipped");
    check(n_vloop > 0, "vector loop iterations");
    check(n_bloop > 0, "byte vector loop iterations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
