// gc_ref_model.svh: reference model of the collector specification.
//
// Included inside a testbench module. It keeps its own copy of both
// semispaces (rmem, keyed by {space, address}) and a flip bit, and runs the
// unserialized specification one function at a time: Driver, Next, Type,
// Pair1-3, Vec, Vloop, Bvec and Bloop, each with the memory operations and
// register updates written in the specification. Beside the final memory
// and the new allocation pointer it returns the number of clock cycles the
// serialized controller should take, by adding for every function the
// states that serialization gives it (one memory access per state, with
// its address set up in the state before). The code shares nothing with
// the RTL, so the two only agree if both follow the specification.
  // ---------------- reference model of the specification -----------------
  content_t rmem [logic [ADDR_W:0]];
  logic rflip;

  // Memory key; the address is converted to ADDR_W bits before it is joined.
  function automatic logic [ADDR_W:0] key(logic sp, addr_t a);
    return {sp, a};
  endfunction

  function automatic content_t rrd(logic sp, addr_t a);
    return rmem.exists(key(sp, a)) ? rmem[key(sp, a)] : '0;
  endfunction

  function automatic content_t mk(tag_t t, addr_t p);
    content_t c;
    c.tag = t;
    c.ptr = p;
    return c;
  endfunction

  typedef enum {F_DRIVER, F_NEXT, F_TYPE, F_PAIR1, F_PAIR2, F_PAIR3,
                F_VEC, F_VLOOP, F_BVEC, F_BLOOP, F_DONE} fn_e;

  // Mechanism counters from the reference trace.
  int n_pair, n_vec, n_bvec, n_fwd, n_fbvec, n_bvh, n_imm, n_vloop, n_bloop;

  // Runs GC from Next with H = root, U = A = 0. Returns the expected number
  // of clock cycles after the Idle cycle that takes GO, up to and including
  // the final Driver cycle that flips the semispaces.
  function automatic longint ref_gc(content_t root_w, output addr_t a_out);
    content_t H, D;
    addr_t U, A, C;
    logic o, n;
    fn_e f;
    longint cyc;
    o = rflip; n = ~rflip;
    H = root_w; U = '0; A = '0; C = '0; D = '0;
    f = F_NEXT;
    cyc = 0;
    while (f != F_DONE) begin
      unique case (f)
        F_DRIVER: if (U == A) begin rflip = ~rflip; f = F_DONE; cyc += 1; end
                  else begin H = rrd(n, U); f = F_NEXT; cyc += 2; end
        F_NEXT: if (is_pointer(H.tag)) begin D = rrd(o, H.ptr); f = F_TYPE; cyc += 2; end
                else if (H.tag == TAG_BVEC_HEAD) begin
                  U = U + btow(H.ptr) + 1; f = F_DRIVER; cyc += 2; n_bvh++;
                end else begin U = U + 1; f = F_DRIVER; cyc += 1; n_imm++; end
        F_TYPE: if (D.tag == TAG_FWD) begin
                  rmem[key(n, U)] = mk(H.tag, D.ptr); U = U + 1; f = F_DRIVER; cyc += 2; n_fwd++;
                end else if (H.tag == TAG_PAIR) begin
                  rmem[key(o, H.ptr)] = mk(TAG_FWD, A); f = F_PAIR1; cyc += 2; n_pair++;
                end else if (H.tag == TAG_VEC) begin
                  rmem[key(n, U)] = mk(H.tag, A); C = D.ptr; U = U + 1; f = F_VEC; cyc += 2; n_vec++;
                end else if (H.tag == TAG_BVEC) begin
                  rmem[key(n, A)] = D; C = btow(D.ptr); D = mk(D.tag, btow(D.ptr)); f = F_BVEC;
                  cyc += 2; n_bvec++;
                end else begin U = U + 1; f = F_DRIVER; cyc += 1; n_fbvec++; end
        F_PAIR1: begin rmem[key(n, A)] = D; f = F_PAIR2; cyc += 2; end
        F_PAIR2: begin
                   rmem[key(n, U)] = mk(H.tag, A); D = rrd(o, H.ptr + 1); A = A + 1;
                   f = F_PAIR3; cyc += 4;
                 end
        F_PAIR3: begin rmem[key(n, A)] = D; U = U + 1; A = A + 1; f = F_DRIVER; cyc += 2; end
        F_VEC: begin rmem[key(n, A)] = D; D = rrd(o, H.ptr + C); C = C - 1; f = F_VLOOP; cyc += 4; end
        F_VLOOP, F_BLOOP:
          if (C == '1) begin
            rmem[key(o, H.ptr)] = mk(TAG_FWD, A);
            A = A + ((f == F_VLOOP) ? D.ptr : btow(D.ptr)) + 1;
            f = F_DRIVER; cyc += 2;
          end else begin
            rmem[key(n, A + C + 1)] = D; D = rrd(o, H.ptr + C); C = C - 1; cyc += 4;
            if (f == F_VLOOP) n_vloop++; else n_bloop++;
          end
        F_BVEC: begin
                  rmem[key(n, U)] = mk(H.tag, A); D = rrd(o, H.ptr + D.ptr); C = C - 1; U = U + 1;
                  f = F_BLOOP; cyc += 4;
                end
        default: f = F_DONE;
      endcase
    end
    a_out = A;
    return cyc;
  endfunction

