// mas_pkg: shared types and the schedule-generation functions of the
// memory access scheduling scheme.
//
// A loop body is described by a "data" vector: one 2-bit code per cycle at
// the internal circuit, 0 = nothing, 1 = a datum read from memory arrives,
// 2 = a result is written to memory, 3 = both. The functions below turn that
// description into per-cycle control tables at elaboration time:
//
//   ctrl_schedule   applies the memory timing rules: a read needed at data
//                   index n strobes the memory at n - dR with Write_Sel_n = 1,
//                   a write at n strobes at n - dW with Write_Sel_n = 0, and
//                   a read and a write falling on one cycle is a conflict.
//   prologue_m,     the modulo schedule of a loop with NRD reads, NC compute
//   write_delay     cycles and NWR writes per iteration: II = NRD + NWR,
//                   m = ceil((NC - dW + dR) / II) iterations of prologue and
//                   D = m*II - dR - NC + dW cycles of extra write delay.
//   pipelined_data  builds the standard body, delays its writes by D (RSH),
//                   then shifts and adds it m times so that the result holds
//                   prologue (m*II), one steady-state period (II) and epilogue.
//   queue_scan      the two backward scans that give QW_En, QR_En, QM_Sel and
//                   the minimum circular-queue length for moving the writes
//                   of a body to its last cycles.
//   queue_depth     the largest queue occupancy when bodies overlap every II
//                   cycles (equals the minimum length for a single body).
//
// Tables are indexed from 0; a caller that needs negative indices (strobes
// issued before data index 0) passes an offset. Table sizes are bounded by
// MAXD and MAXW. The scheduling rules, formulas and scans follow the
// published scheme; the table encoding, the bounds and queue_depth are this
// implementation's own.
package mas_pkg;

  localparam int MAXD = 128;  // longest data vector (cycles)
  localparam int MAXW = 256;  // longest control table (cycles)

  typedef enum logic [1:0] {
    ACC_NONE = 2'd0,
    ACC_RD   = 2'd1,
    ACC_WR   = 2'd2,
    ACC_RW   = 2'd3
  } acc_t;

  typedef logic [MAXD-1:0][1:0] data_vec_t;
  typedef logic [MAXW-1:0]      tbl_t;

  // Loop phase reported by the controller.
  typedef enum logic [1:0] {
    PH_IDLE     = 2'd0,
    PH_PROLOGUE = 2'd1,
    PH_STEADY   = 2'd2,
    PH_EPILOGUE = 2'd3
  } phase_t;

  // Memory control schedule. Write_Sel_n has three values: driven 1 (read),
  // driven 0 (write) and released (high impedance, ws_drv = 0).
  typedef struct packed {
    logic conflict;
    tbl_t strobe_n;
    tbl_t ws_drv;
    tbl_t ws_val;
  } ctrl_sched_t;

  typedef struct packed {
    logic [15:0] lmin;  // minimum queue length
    logic [15:0] nk;    // trailing writes that bypass the queue
    tbl_t        qw_en;
    tbl_t        qr_en;
    tbl_t        qm_sel;
  } queue_ctrl_t;

  function automatic logic is_rd(logic [1:0] c);
    return c == ACC_RD || c == ACC_RW;
  endfunction

  function automatic logic is_wr(logic [1:0] c);
    return c == ACC_WR || c == ACC_RW;
  endfunction

  // Timing rules 1-3 with conflict detection. Index k of the tables is the
  // strobe index plus ofs.
  function automatic ctrl_sched_t ctrl_schedule(data_vec_t data, int len,
                                                int dr, int dw, int ofs);
    ctrl_sched_t s;
    int k;
    s.conflict = 1'b0;
    s.strobe_n = '1;
    s.ws_drv   = '0;
    s.ws_val   = '1;
    for (int n = 0; n < len; n++) begin
      if (is_rd(data[n])) begin
        k = n - dr + ofs;
        if (k < 0 || k >= MAXW || (s.ws_drv[k] && !s.ws_val[k])) begin
          s.conflict = 1'b1;
          return s;
        end
        s.strobe_n[k] = 1'b0;
        s.ws_drv[k]   = 1'b1;
        s.ws_val[k]   = 1'b1;
      end
      if (is_wr(data[n])) begin
        k = n - dw + ofs;
        if (k < 0 || k >= MAXW || (s.ws_drv[k] && s.ws_val[k])) begin
          s.conflict = 1'b1;
          return s;
        end
        s.strobe_n[k] = 1'b0;
        s.ws_drv[k]   = 1'b1;
        s.ws_val[k]   = 1'b0;
      end
    end
    return s;
  endfunction

  function automatic int prologue_m(int nrd, int nc, int nwr, int dr, int dw);
    int num, den;
    num = nc - dw + dr;
    den = nrd + nwr;
    if (num <= 0) return 0;
    return (num + den - 1) / den;
  endfunction

  function automatic int write_delay(int nrd, int nc, int nwr, int dr, int dw);
    return prologue_m(nrd, nc, nwr, dr, dw) * (nrd + nwr) - dr - nc + dw;
  endfunction

  // (NRD x 1, NC x 0, NWR x 2)
  function automatic data_vec_t standard_data(int nrd, int nc, int nwr);
    data_vec_t d;
    d = '0;
    for (int n = 0; n < nrd + nc + nwr && n < MAXD; n++)
      d[n] = (n < nrd) ? ACC_RD : (n < nrd + nc) ? ACC_NONE : ACC_WR;
    return d;
  endfunction

  // RSH(index, distance, data): every element from index on moves right by
  // distance; the gap is filled with 0.
  function automatic data_vec_t rsh(int index, int distance, data_vec_t data);
    data_vec_t d;
    for (int n = 0; n < MAXD; n++) begin
      if (n < index)                 d[n] = data[n];
      else if (n < index + distance) d[n] = ACC_NONE;
      else                           d[n] = data[n-distance];
    end
    return d;
  endfunction

  function automatic int pipelined_len(int nrd, int nc, int nwr, int dr, int dw);
    return nrd + nc + nwr + write_delay(nrd, nc, nwr, dr, dw)
           + prologue_m(nrd, nc, nwr, dr, dw) * (nrd + nwr);
  endfunction

  // Steps 1-5 of the pipelined-loop schedule generation.
  function automatic data_vec_t pipelined_data(int nrd, int nc, int nwr,
                                               int dr, int dw);
    data_vec_t d, ds, sh;
    int ii, m, dly;
    ii  = nrd + nwr;
    m   = prologue_m(nrd, nc, nwr, dr, dw);
    dly = write_delay(nrd, nc, nwr, dr, dw);
    d   = rsh(nrd + nc, dly, standard_data(nrd, nc, nwr));
    ds  = d;
    for (int i = 1; i <= m; i++) begin
      sh = rsh(0, ii, d);
      for (int n = 0; n < MAXD; n++) d[n] = ds[n] + sh[n];
    end
    return d;
  endfunction

  // One body as the internal circuit sees it: NRD reads first, results in
  // the cycles marked in orig_wr.
  function automatic data_vec_t body_vec(int nrd, int nc, int nwr,
                                         logic [63:0] orig_wr);
    data_vec_t b;
    b = '0;
    for (int n = 0; n < nrd + nc + nwr && n < MAXD && n < 64; n++) begin
      if (n < nrd) b[n] = ACC_RD;
      if (orig_wr[n]) b[n] = ACC_WR;
    end
    return b;
  endfunction

  // Two backward scans over a body of length n_len.
  function automatic queue_ctrl_t queue_scan(data_vec_t data, int n_len);
    queue_ctrl_t q;
    int  nk, lmin, num;
    logic flag;
    q = '0;
    nk = 0; lmin = 0; flag = 1'b1;
    for (int n = n_len - 1; n >= 0; n--) begin
      if (flag) begin
        if (is_wr(data[n])) begin
          q.qm_sel[n] = 1'b1;
          nk++;
        end else begin
          flag = 1'b0;
        end
      end else if (is_wr(data[n])) begin
        q.qw_en[n] = 1'b1;
        lmin++;
      end
    end
    num = lmin;
    for (int n = n_len - nk - 1; n >= n_len - nk - num && n >= 0; n--) begin
      q.qr_en[n] = 1'b1;
      if (is_wr(data[n])) lmin--;
    end
    q.lmin = 16'(lmin);
    q.nk   = 16'(nk);
    return q;
  endfunction

  // Largest number of entries held at once when bodies described by qw/qr
  // (length n_len) start every ii cycles.
  function automatic int queue_depth(tbl_t qw, tbl_t qr, int n_len, int ii);
    int occ [MAXW];
    int c, best, sum;
    c = 0;
    for (int p = 0; p < MAXW; p++) begin
      if (p < n_len) c = c + int'(qw[p]) - int'(qr[p]);
      occ[p] = (p < n_len) ? c : 0;
    end
    best = 0;
    for (int t = 0; t < ii; t++) begin
      sum = 0;
      for (int p = t; p < n_len; p += ii) sum += occ[p];
      if (sum > best) best = sum;
    end
    return best;
  endfunction

  // Queue length needed by the write standardizer of a pipelined loop: the
  // body is extended by the write delay D so that its writes land in the
  // standard slots, scanned, and overlapped every II cycles. At least 1.
  function automatic int std_queue_depth(int nrd, int nc, int nwr, int dr,
                                         int dw, logic [63:0] orig_wr);
    queue_ctrl_t q;
    int nq, d;
    nq = nrd + nc + nwr + write_delay(nrd, nc, nwr, dr, dw);
    q  = queue_scan(body_vec(nrd, nc, nwr, orig_wr), nq);
    d  = queue_depth(q.qw_en, q.qr_en, nq, nrd + nwr);
    return (d < 1) ? 1 : d;
  endfunction

endpackage
