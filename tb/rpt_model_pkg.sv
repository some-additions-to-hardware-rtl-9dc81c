// rpt_model_pkg: untimed reference model of the linear-stride RPT prefetcher
// for the testbenches.
//
// It restates the scheme with plain integers, separately from the RTL:
// one access(pc, ea) call per reference returns the entry after its update
// and the prefetch addresses.  States are numbered 0 init, 1 transient1,
// 2 transient2, 3 steady, 4 no_pred; stimes is -1, 0 or +1.  Addresses and
// strides are 32-bit and wrap.  The table is direct-mapped on pc[IDX+1:2]
// with full-PC tags, like the RTL.
package rpt_model_pkg;

  localparam longint MASK = 64'hFFFF_FFFF;

  function automatic longint to_signed32(longint v);
    v = v & MASK;
    return (v >= 64'h8000_0000) ? v - 64'h1_0000_0000 : v;
  endfunction

  function automatic longint abs64(longint v);
    return (v < 0) ? -v : v;
  endfunction

  // Result of one reference
  typedef struct {
    bit     alloc;
    bit     correct;
    int     state;
    int     stimes;
    longint stride;   // signed
    int     npf;      // 0, 1 or 2 prefetches
    longint pf0;      // "+" or only prefetch
    longint pf1;      // "-" prefetch
  } result_t;

  class rpt_model;
    int unsigned entries;
    bit     v      [];
    longint tag    [];
    longint prev   [];
    longint stride [];
    int     stimes [];
    int     state  [];

    function new(int unsigned n);
      entries = n;
      v = new[n]; tag = new[n]; prev = new[n]; stride = new[n];
      stimes = new[n]; state = new[n];
      foreach (v[i]) v[i] = 0;
    endfunction

    function result_t access(longint pc, longint ea);
      result_t r;
      int     i;
      longint ns, olda, newa, predmag, sm;
      int     nst;
      i = int'((pc >> 2) % entries);
      r.alloc = 0; r.correct = 0;
      if (!v[i] || tag[i] != pc) begin
        v[i] = 1; tag[i] = pc; prev[i] = ea; stride[i] = 0;
        stimes[i] = 0; state[i] = 0; r.alloc = 1;
      end else begin
        ns   = to_signed32(ea - prev[i]);
        olda = abs64(stride[i]);
        newa = abs64(ns);
        // ratio of the new stride to the old one
        if (newa == ((olda * 2) & MASK) && newa != olda / 2) nst = 1;
        else if (newa == olda / 2 && newa != ((olda * 2) & MASK)) nst = -1;
        else nst = 0;
        // was the reference one of the predicted addresses?
        if (stimes[i] == 0) r.correct = (ns == stride[i]);
        else begin
          predmag = (stimes[i] == 1) ? ((olda * 2) & MASK) : olda / 2;
          r.correct = (newa == predmag);
        end
        prev[i] = ea;
        case (state[i])
          0: if (r.correct) begin state[i] = 3; stride[i] = ns; end
             else begin state[i] = 1; stride[i] = ns; end
          1: if (r.correct) begin state[i] = 3; stride[i] = ns; end
             else begin
               state[i] = (nst != 0) ? 2 : 4; stride[i] = ns; stimes[i] = nst;
             end
          2: if (r.correct) begin state[i] = 3; stride[i] = ns; end
             else begin state[i] = 4; stride[i] = ns; stimes[i] = nst; end
          3: if (r.correct) stride[i] = ns;
             else state[i] = 0;
          4: if (r.correct) begin state[i] = 1; stride[i] = ns; end
             else begin stride[i] = ns; stimes[i] = nst; end
          default: ;
        endcase
      end
      r.state = state[i]; r.stimes = stimes[i]; r.stride = stride[i];
      // prefetches from the updated entry
      r.npf = 0; r.pf0 = 0; r.pf1 = 0;
      if (state[i] != 4) begin
        if (stimes[i] == 0) begin
          if (stride[i] != 0) begin
            r.npf = 1; r.pf0 = (prev[i] + stride[i]) & MASK;
          end
        end else begin
          sm = (stimes[i] == 1) ? ((abs64(stride[i]) * 2) & MASK) : abs64(stride[i]) / 2;
          if (sm != 0) begin
            r.npf = 2; r.pf0 = (prev[i] + sm) & MASK; r.pf1 = (prev[i] - sm) & MASK;
          end
        end
      end
      return r;
    endfunction
  endclass

endpackage
