// hqc_kem: unified HQC.KEM accelerator (key generation, encapsulation and
// decapsulation for HQC-128, HQC-192 and HQC-256, chosen at run time).
//
// Structure. Functional units (SHAKE256 with its hash feeder, dense and
// sparse samplers, sparse-by-dense multiplier, polynomial adder, RS-RM
// encoder and decoder, memory comparator) share five 128-bit-word memories
// through a point-to-point network. A global controller steps through a
// fixed schedule for the selected primitive; in each step exactly one unit
// owns the memory ports it needs, so arbitration is a multiplexer driven by
// the step. The schedule is the same for all parameter sets; the set only
// changes the constants loaded from the parameter ROM (lengths, weights,
// code sizes), i.e. how much of each memory region is used.
//
// Memories and regions (word addresses):
//   0 DENSE (4 read ports): h @0, s @512, u @1024, u' @1536
//   1 ACC   (1 read port) : product h*r (h*y, u*y) @0, s*r_b @512
//   2 SPARSE              : y @0, x @32, r_b @64, e @96, r_a @128
//   3 CW    (2 read ports): codeword / v' @0, received v @512, decode input @1024
//   4 IO                  : phi @0, gamma @4, sigma @8, m @10, salt @12,
//                           theta @14, K @18, m' @22 (16 bytes per word)
// Polynomials are bit strings, coefficient i in bit i%128 of word i/128;
// sparse polynomials are lists of 16-bit indices, eight per word; byte
// strings are stored little-endian, sixteen bytes per word.
//
// Schedules (one unit per step, in order; see the README for the data flow):
//   KEYGEN: h <- CSPRNG(phi); y, x <- CSPRNG(gamma); s = h*y + x.
//   ENCAP : theta <- HASH-G(m || phi[0:32] || salt); h <- CSPRNG(phi);
//           cdw = ENCODE(m); r_b, e, r_a <- CSPRNG(theta); h*r_b; s*r_b;
//           v = cdw + trunc(s*r_b + e); u = h*r_b + r_a; K <- HASH-K(m||u||v).
//   DECAP : y <- CSPRNG(gamma); m' = DECODE(v + trunc(u*y)); re-encrypt m'
//           into (u', v'); compare; K <- HASH-K((m' or sigma) || u || v).
// The document's schedule overlaps some steps (sampling while multiplying,
// encoding while h is expanded); this controller runs them one after the
// other, which changes latency, not results.
//
// Host interface: while idle, the host reads and writes any memory through
// host_mem/host_addr (read data one cycle later). Pulse start with op and
// sec; done pulses at the end; reject reports, after a decapsulation,
// whether the implicit-rejection path (sigma) was taken.
module hqc_kem
  import hqc_pkg::*;
#(
  parameter int unsigned L = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [1:0]   op,        // 0 keygen, 1 encapsulate, 2 decapsulate
  input  sec_t         sec,
  output logic         busy,
  output logic         done,
  output logic         reject,
  input  logic [2:0]   host_mem,
  input  logic [10:0]  host_addr,
  input  logic         host_we,
  input  logic [127:0] host_wdata,
  output logic [127:0] host_rdata
);

  localparam int AW = 11;
  localparam int NM = 5;
  localparam logic [2:0] M_D = 3'd0, M_ACC = 3'd1, M_SP = 3'd2, M_CW = 3'd3, M_IO = 3'd4;

  typedef enum logic [3:0] {
    U_END, U_FEED, U_DSAMP, U_SSAMP, U_MULT, U_ADD, U_ENC, U_DEC, U_CMP
  } unit_t;

  typedef enum logic [1:0] {OP_KEYGEN = 2'd0, OP_ENCAP = 2'd1, OP_DECAP = 2'd2} op_t;

  typedef struct packed {
    unit_t              unit;
    logic [2:0]         mem_a, mem_b, mem_d;
    logic [AW-1:0]      base_a, base_b, base_d;
    logic [15:0]        n;          // words, bits or weight, per unit
    logic               flip, use_b;
    logic [7:0]         domain;
    logic [2:0]         nseg;
    logic [3:0][2:0]    seg_mem;
    logic [3:0][AW-1:0] seg_base;
    logic [3:0][15:0]   seg_bytes;
  } step_t;

  // ------------------------------------------------------------ registers
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_FIN} fsa_t;
  fsa_t       fsa;
  op_t        op_q;
  sec_t       sec_q;
  logic [5:0] pc;
  logic       dec_fail, differ;
  params_t    prm;
  step_t      cur;

  hqc_param_rom u_rom (.sec(sec_q), .prm(prm));

  // ------------------------------------------------------------ schedule
  function automatic step_t st_feed(logic [7:0] dom, logic [2:0] ns,
                                    logic [2:0] m0, logic [AW-1:0] b0, logic [15:0] n0,
                                    logic [2:0] m1, logic [AW-1:0] b1, logic [15:0] n1,
                                    logic [2:0] m2, logic [AW-1:0] b2, logic [15:0] n2);
    step_t s;
    s = '0;
    s.unit = U_FEED; s.domain = dom; s.nseg = ns;
    s.seg_mem[0] = m0; s.seg_base[0] = b0; s.seg_bytes[0] = n0;
    s.seg_mem[1] = m1; s.seg_base[1] = b1; s.seg_bytes[1] = n1;
    s.seg_mem[2] = m2; s.seg_base[2] = b2; s.seg_bytes[2] = n2;
    return s;
  endfunction

  function automatic step_t st_unit(unit_t u, logic [2:0] ma, logic [AW-1:0] ba,
                                    logic [2:0] mb, logic [AW-1:0] bb,
                                    logic [2:0] md, logic [AW-1:0] bd,
                                    logic [15:0] n, logic fl, logic ub);
    step_t s;
    s = '0;
    s.unit = u; s.mem_a = ma; s.base_a = ba; s.mem_b = mb; s.base_b = bb;
    s.mem_d = md; s.base_d = bd; s.n = n; s.flip = fl; s.use_b = ub;
    return s;
  endfunction

  // Encryption steps shared by encapsulation and the re-encryption of
  // decapsulation; mloc is the message, uloc the destination of u.
  function automatic step_t enc_step(int i, params_t pr, logic [AW-1:0] mloc, logic [AW-1:0] uloc);
    logic [15:0] kb, vw;
    kb = 16'(pr.ke);
    vw = 16'(int'(pr.ne) * int'(pr.rm_mult));
    unique case (i)
      0:  return st_feed(8'h03, 3'd3, M_IO, mloc, kb, M_IO, 11'd0, 16'd32, M_IO, 11'd12, 16'd16);
      1:  return st_unit(U_DSAMP, 0, 0, 0, 0, M_IO, 11'd14, 16'd512, 0, 0);
      2:  return st_feed(8'h02, 3'd1, M_IO, 11'd0, 16'd40, 0, 0, 0, 0, 0, 0);
      3:  return st_unit(U_DSAMP, 0, 0, 0, 0, M_D, 11'd0, pr.p, 0, 0);
      4:  return st_unit(U_ENC, M_IO, mloc, 0, 0, M_CW, 11'd0, 0, 0, 0);
      5:  return st_feed(8'h02, 3'd1, M_IO, 11'd14, 16'd64, 0, 0, 0, 0, 0, 0);
      6:  return st_unit(U_SSAMP, 0, 0, 0, 0, M_SP, 11'd64, 16'(pr.wr), 0, 0);
      7:  return st_unit(U_SSAMP, 0, 0, 0, 0, M_SP, 11'd96, 16'(pr.wr), 0, 0);
      8:  return st_unit(U_SSAMP, 0, 0, 0, 0, M_SP, 11'd128, 16'(pr.wr), 0, 0);
      9:  return st_unit(U_MULT, M_D, 11'd0, M_SP, 11'd64, M_ACC, 11'd0, 16'(pr.wr), 0, 0);
      10: return st_unit(U_MULT, M_D, 11'd512, M_SP, 11'd64, M_ACC, 11'd512, 16'(pr.wr), 0, 0);
      11: return st_unit(U_ADD, M_ACC, 11'd512, M_SP, 11'd96, M_ACC, 11'd512, 16'(pr.wr), 1, 0);
      12: return st_unit(U_ADD, M_CW, 11'd0, M_ACC, 11'd512, M_CW, 11'd0, vw, 0, 1);
      13: return st_unit(U_ADD, M_ACC, 11'd0, 0, 0, M_D, uloc, 16'(pr.words), 0, 0);
      default: return st_unit(U_ADD, M_D, uloc, M_SP, 11'd128, M_D, uloc, 16'(pr.wr), 1, 0);
    endcase
  endfunction

  function automatic step_t get_step(op_t o, logic [5:0] i, params_t pr, logic rej);
    step_t s;
    logic [15:0] kb, pb, vw, vb;
    kb = 16'(pr.ke);
    pb = 16'((int'(pr.p) + 7) / 8);
    vw = 16'(int'(pr.ne) * int'(pr.rm_mult));
    vb = 16'(int'(vw) * 16);
    s  = '0;
    unique case (o)
      OP_KEYGEN: unique case (i)
        0: s = st_feed(8'h02, 3'd1, M_IO, 11'd0, 16'd40, 0, 0, 0, 0, 0, 0);
        1: s = st_unit(U_DSAMP, 0, 0, 0, 0, M_D, 11'd0, pr.p, 0, 0);
        2: s = st_feed(8'h02, 3'd1, M_IO, 11'd4, 16'd40, 0, 0, 0, 0, 0, 0);
        3: s = st_unit(U_SSAMP, 0, 0, 0, 0, M_SP, 11'd0, 16'(pr.w), 0, 0);
        4: s = st_unit(U_SSAMP, 0, 0, 0, 0, M_SP, 11'd32, 16'(pr.w), 0, 0);
        5: s = st_unit(U_MULT, M_D, 11'd0, M_SP, 11'd0, M_ACC, 11'd0, 16'(pr.w), 0, 0);
        6: s = st_unit(U_ADD, M_ACC, 11'd0, 0, 0, M_D, 11'd512, 16'(pr.words), 0, 0);
        7: s = st_unit(U_ADD, M_D, 11'd512, M_SP, 11'd32, M_D, 11'd512, 16'(pr.w), 1, 0);
        default: s.unit = U_END;
      endcase
      OP_ENCAP: begin
        if (i <= 6'd14) s = enc_step(int'(i), pr, 11'd10, 11'd1024);
        else if (i == 6'd15) s = st_feed(8'h04, 3'd3, M_IO, 11'd10, kb, M_D, 11'd1024, pb, M_CW, 11'd0, vb);
        else if (i == 6'd16) s = st_unit(U_DSAMP, 0, 0, 0, 0, M_IO, 11'd18, 16'd512, 0, 0);
        else s.unit = U_END;
      end
      OP_DECAP: begin
        if (i == 6'd0)      s = st_feed(8'h02, 3'd1, M_IO, 11'd4, 16'd40, 0, 0, 0, 0, 0, 0);
        else if (i == 6'd1) s = st_unit(U_SSAMP, 0, 0, 0, 0, M_SP, 11'd0, 16'(pr.w), 0, 0);
        else if (i == 6'd2) s = st_unit(U_MULT, M_D, 11'd1024, M_SP, 11'd0, M_ACC, 11'd0, 16'(pr.w), 0, 0);
        else if (i == 6'd3) s = st_unit(U_ADD, M_CW, 11'd512, M_ACC, 11'd0, M_CW, 11'd1024, vw, 0, 1);
        else if (i == 6'd4) s = st_unit(U_DEC, M_CW, 11'd1024, 0, 0, M_IO, 11'd22, 0, 0, 0);
        else if (i <= 6'd19) s = enc_step(int'(i) - 5, pr, 11'd22, 11'd1536);
        else if (i == 6'd20) s = st_unit(U_CMP, M_D, 11'd1024, M_D, 11'd1536, 0, 0, 16'(pr.words), 0, 0);
        else if (i == 6'd21) s = st_unit(U_CMP, M_CW, 11'd0, M_CW, 11'd512, 0, 0, vw, 0, 0);
        else if (i == 6'd22) s = st_feed(8'h04, 3'd3, M_IO, rej ? 11'd8 : 11'd22, kb,
                                         M_D, 11'd1024, pb, M_CW, 11'd512, vb);
        else if (i == 6'd23) s = st_unit(U_DSAMP, 0, 0, 0, 0, M_IO, 11'd18, 16'd512, 0, 0);
        else s.unit = U_END;
      end
      default: s.unit = U_END;
    endcase
    return s;
  endfunction

  assign cur    = get_step(op_q, pc, prm, dec_fail | differ);
  assign reject = dec_fail | differ;
  assign busy   = (fsa != S_IDLE);

  wire issue = (fsa == S_ISSUE);

  // ------------------------------------------------------------ memories
  logic [AW-1:0] ra0 [NM];
  logic [AW-1:0] ra1 [NM];
  logic [127:0]  rd0 [NM];
  logic [127:0]  rd1 [NM];
  logic          mwe [NM];
  logic [AW-1:0] mwa [NM];
  logic [127:0]  mwd [NM];
  logic [AW-1:0] dra [L];
  logic [127:0]  drd [L];

  hqc_sram #(.DEPTH(2048), .NR(L)) u_mem_dense (
    .clk, .raddr(dra), .rdata(drd), .we(mwe[0]), .waddr(mwa[0]), .wdata(mwd[0]));
  assign rd0[0] = drd[0];
  assign rd1[0] = drd[1];

  logic [9:0]   acc_ra [1];
  logic [127:0] acc_rd [1];
  assign acc_ra[0] = ra0[1][9:0];
  hqc_sram #(.DEPTH(1024), .NR(1)) u_mem_acc (
    .clk, .raddr(acc_ra), .rdata(acc_rd), .we(mwe[1]), .waddr(mwa[1][9:0]), .wdata(mwd[1]));
  assign rd0[1] = acc_rd[0];
  assign rd1[1] = '0;

  logic [7:0]   sp_ra [1];
  logic [127:0] sp_rd [1];
  assign sp_ra[0] = ra0[2][7:0];
  hqc_sram #(.DEPTH(256), .NR(1)) u_mem_sparse (
    .clk, .raddr(sp_ra), .rdata(sp_rd), .we(mwe[2]), .waddr(mwa[2][7:0]), .wdata(mwd[2]));
  assign rd0[2] = sp_rd[0];
  assign rd1[2] = '0;

  logic [10:0]  cw_ra [2];
  logic [127:0] cw_rd [2];
  assign cw_ra[0] = ra0[3];
  assign cw_ra[1] = ra1[3];
  hqc_sram #(.DEPTH(2048), .NR(2)) u_mem_cw (
    .clk, .raddr(cw_ra), .rdata(cw_rd), .we(mwe[3]), .waddr(mwa[3]), .wdata(mwd[3]));
  assign rd0[3] = cw_rd[0];
  assign rd1[3] = cw_rd[1];

  logic [4:0]   io_ra [1];
  logic [127:0] io_rd [1];
  assign io_ra[0] = ra0[4][4:0];
  hqc_sram #(.DEPTH(32), .NR(1)) u_mem_io (
    .clk, .raddr(io_ra), .rdata(io_rd), .we(mwe[4]), .waddr(mwa[4][4:0]), .wdata(mwd[4]));
  assign rd0[4] = io_rd[0];
  assign rd1[4] = '0;

  // ------------------------------------------------------------ units
  // SHAKE256 and its feeder
  logic          fd_busy, fd_done, sh_in_valid, sh_in_ready, sh_in_last, sh_out_valid, sh_out_ready;
  logic [2:0]    fd_mem;
  logic [AW-1:0] fd_addr;
  logic [63:0]   sh_in_data, sh_out_data;
  logic [3:0]    sh_in_bytes;
  logic [2:0]    seg_mem_a [4];
  logic [AW-1:0] seg_base_a [4];
  logic [15:0]   seg_bytes_a [4];
  always_comb
    for (int i = 0; i < 4; i++) begin
      seg_mem_a[i]   = cur.seg_mem[i];
      seg_base_a[i]  = cur.seg_base[i];
      seg_bytes_a[i] = cur.seg_bytes[i];
    end

  hash_feeder #(.AW(AW)) u_feed (
    .clk, .rst_n, .start(issue && cur.unit == U_FEED), .nseg(cur.nseg), .seg_mem(seg_mem_a),
    .seg_base(seg_base_a), .seg_bytes(seg_bytes_a), .domain(cur.domain), .cur_mem(fd_mem),
    .rd_addr(fd_addr), .rd_data(rd0[fd_mem]), .sh_valid(sh_in_valid), .sh_ready(sh_in_ready),
    .sh_data(sh_in_data), .sh_bytes(sh_in_bytes), .sh_last(sh_in_last), .busy(fd_busy), .done(fd_done)
  );

  shake256 u_shake (
    .clk, .rst_n, .start(issue && cur.unit == U_FEED), .in_valid(sh_in_valid), .in_ready(sh_in_ready),
    .in_data(sh_in_data), .in_bytes(sh_in_bytes), .in_last(sh_in_last), .out_valid(sh_out_valid),
    .out_ready(sh_out_ready), .out_data(sh_out_data)
  );

  // dense sampler (h, theta, K)
  logic          ds_ready, ds_we, ds_busy, ds_done;
  logic [AW-1:0] ds_waddr;
  logic [127:0]  ds_wdata;
  dense_sampler #(.AW(AW)) u_dsamp (
    .clk, .rst_n, .start(issue && cur.unit == U_DSAMP), .nbits(cur.n), .base(cur.base_d),
    .in_valid(sh_out_valid && cur.unit == U_DSAMP), .in_ready(ds_ready), .in_data(sh_out_data),
    .we(ds_we), .waddr(ds_waddr), .wdata(ds_wdata), .busy(ds_busy), .done(ds_done)
  );

  // 64-to-32-bit splitter between SHAKE and the sparse sampler; the upper
  // half of a lane is kept for the next sample drawn from the same stream.
  logic          half;
  logic          ss_rnd_ready, ss_we, ss_busy, ss_done;
  logic [AW-1:0] ss_waddr;
  logic [127:0]  ss_wdata;
  wire           ss_rnd_valid = sh_out_valid && cur.unit == U_SSAMP;
  wire  [31:0]   ss_rnd = half ? sh_out_data[63:32] : sh_out_data[31:0];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                half <= 1'b0;
    else if (issue && cur.unit == U_FEED)      half <= 1'b0;
    else if (ss_rnd_valid && ss_rnd_ready)     half <= ~half;
  end

  sparse_sampler #(.AW(AW)) u_ssamp (
    .clk, .rst_n, .start(issue && cur.unit == U_SSAMP), .p(prm.p), .weight(cur.n[7:0]),
    .base(cur.base_d), .rnd_valid(ss_rnd_valid), .rnd_ready(ss_rnd_ready), .rnd_data(ss_rnd),
    .we(ss_we), .waddr(ss_waddr), .wdata(ss_wdata), .busy(ss_busy), .done(ss_done)
  );

  always_comb begin
    sh_out_ready = 1'b0;
    if (cur.unit == U_DSAMP) sh_out_ready = ds_ready;
    if (cur.unit == U_SSAMP) sh_out_ready = ss_rnd_ready && half;
  end

  // multiplier
  logic          mu_busy, mu_done, mu_we;
  logic [AW-1:0] mu_daddr [L];
  logic [AW-1:0] mu_saddr, mu_araddr, mu_awaddr;
  logic [127:0]  mu_wdata;
  poly_mult #(.L(L), .AW(AW)) u_mult (
    .clk, .rst_n, .start(issue && cur.unit == U_MULT), .sec(sec_q), .nidx(cur.n[7:0]),
    .d_base(cur.base_a), .s_base(cur.base_b), .a_base(cur.base_d), .busy(mu_busy), .done(mu_done),
    .d_addr(mu_daddr), .d_rdata(drd), .s_addr(mu_saddr), .s_rdata(rd0[M_SP]),
    .a_raddr(mu_araddr), .a_rdata(rd0[M_ACC]), .a_we(mu_we), .a_waddr(mu_awaddr), .a_wdata(mu_wdata)
  );

  // adder
  logic          ad_busy, ad_done, ad_we;
  logic [AW-1:0] ad_ra, ad_rb, ad_wa;
  logic [127:0]  ad_wd;
  poly_adder #(.AW(AW)) u_add (
    .clk, .rst_n, .start(issue && cur.unit == U_ADD), .flip(cur.flip), .use_b(cur.use_b),
    .a_base(cur.base_a), .b_base(cur.base_b), .dst_base(cur.base_d), .n(cur.n[9:0]),
    .ra_addr(ad_ra), .ra_data(rd0[cur.mem_a]), .rb_addr(ad_rb), .rb_data(rd0[cur.mem_b]),
    .we(ad_we), .waddr(ad_wa), .wdata(ad_wd), .busy(ad_busy), .done(ad_done)
  );

  // RS-RM encoder and decoder
  logic          en_busy, en_done, en_we;
  logic [AW-1:0] en_ra, en_wa;
  logic [127:0]  en_wd;
  rsrm_encoder #(.AW(AW)) u_enc (
    .clk, .rst_n, .start(issue && cur.unit == U_ENC), .sec(sec_q), .msg_base(cur.base_a),
    .cw_base(cur.base_d), .rd_addr(en_ra), .rd_data(rd0[M_IO]), .we(en_we), .waddr(en_wa),
    .wdata(en_wd), .busy(en_busy), .done(en_done)
  );

  logic          de_busy, de_done, de_we, de_fail;
  logic [AW-1:0] de_ra, de_wa;
  logic [127:0]  de_wd;
  rsrm_decoder #(.AW(AW)) u_dec (
    .clk, .rst_n, .start(issue && cur.unit == U_DEC), .sec(sec_q), .cw_base(cur.base_a),
    .msg_base(cur.base_d), .rd_addr(de_ra), .rd_data(rd0[M_CW]), .we(de_we), .waddr(de_wa),
    .wdata(de_wd), .busy(de_busy), .done(de_done), .fail(de_fail)
  );

  // comparator
  logic          cm_busy, cm_done, cm_differ;
  logic [AW-1:0] cm_a, cm_b;
  mem_compare #(.AW(AW)) u_cmp (
    .clk, .rst_n, .start(issue && cur.unit == U_CMP), .base_a(cur.base_a), .base_b(cur.base_b),
    .n(cur.n[AW-1:0]), .addr_a(cm_a), .addr_b(cm_b), .rdata_a(rd0[cur.mem_a]),
    .rdata_b(rd1[cur.mem_b]), .busy(cm_busy), .done(cm_done), .differ(cm_differ)
  );

  // ------------------------------------------------------------ network
  always_comb begin
    for (int m = 0; m < NM; m++) begin
      ra0[m] = '0; ra1[m] = '0; mwe[m] = 1'b0; mwa[m] = '0; mwd[m] = '0;
    end
    for (int q = 0; q < L; q++) dra[q] = '0;
    if (fsa == S_IDLE) begin
      ra0[host_mem] = host_addr;
      mwe[host_mem] = host_we;
      mwa[host_mem] = host_addr;
      mwd[host_mem] = host_wdata;
    end else begin
      unique case (cur.unit)
        U_FEED:  ra0[fd_mem] = fd_addr;
        U_DSAMP: begin mwe[cur.mem_d] = ds_we; mwa[cur.mem_d] = ds_waddr; mwd[cur.mem_d] = ds_wdata; end
        U_SSAMP: begin mwe[M_SP] = ss_we; mwa[M_SP] = ss_waddr; mwd[M_SP] = ss_wdata; end
        U_MULT: begin
          for (int q = 0; q < L; q++) dra[q] = mu_daddr[q];
          ra0[M_SP]  = mu_saddr;
          ra0[M_ACC] = mu_araddr;
          mwe[M_ACC] = mu_we; mwa[M_ACC] = mu_awaddr; mwd[M_ACC] = mu_wdata;
        end
        U_ADD: begin
          ra0[cur.mem_a] = ad_ra;
          if (cur.mem_b != cur.mem_a) ra0[cur.mem_b] = ad_rb;
          mwe[cur.mem_d] = ad_we; mwa[cur.mem_d] = ad_wa; mwd[cur.mem_d] = ad_wd;
        end
        U_ENC: begin
          ra0[M_IO] = en_ra;
          mwe[M_CW] = en_we; mwa[M_CW] = en_wa; mwd[M_CW] = en_wd;
        end
        U_DEC: begin
          ra0[M_CW] = de_ra;
          mwe[M_IO] = de_we; mwa[M_IO] = de_wa; mwd[M_IO] = de_wd;
        end
        U_CMP: begin
          ra0[cur.mem_a] = cm_a;
          ra1[cur.mem_b] = cm_b;
        end
        default: ;
      endcase
    end
    // dense memory: ports 0 and 1 also serve the single-port units
    if (!(fsa != S_IDLE && cur.unit == U_MULT)) begin
      dra[0] = ra0[M_D];
      dra[1] = ra1[M_D];
    end
  end

  assign host_rdata = rd0[host_mem];

  // ------------------------------------------------------------ controller
  logic unit_done;
  always_comb begin
    unique case (cur.unit)
      U_FEED:  unit_done = fd_done;
      U_DSAMP: unit_done = ds_done;
      U_SSAMP: unit_done = ss_done;
      U_MULT:  unit_done = mu_done;
      U_ADD:   unit_done = ad_done;
      U_ENC:   unit_done = en_done;
      U_DEC:   unit_done = de_done;
      U_CMP:   unit_done = cm_done;
      default: unit_done = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsa <= S_IDLE; op_q <= OP_KEYGEN; sec_q <= HQC128; pc <= '0;
      dec_fail <= 1'b0; differ <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (fsa)
        S_IDLE: if (start) begin
          op_q     <= op_t'(op);
          sec_q    <= (sec == HQC192 || sec == HQC256) ? sec : HQC128;
          pc       <= '0;
          dec_fail <= 1'b0;
          differ   <= 1'b0;
          fsa      <= S_ISSUE;
        end
        S_ISSUE: fsa <= (cur.unit == U_END) ? S_FIN : S_WAIT;
        S_WAIT: if (unit_done) begin
          if (cur.unit == U_DEC) dec_fail <= de_fail;
          if (cur.unit == U_CMP) differ   <= differ | cm_differ;
          pc  <= pc + 6'd1;
          fsa <= S_ISSUE;
        end
        S_FIN: begin
          fsa  <= S_IDLE;
          done <= 1'b1;
        end
        default: fsa <= S_IDLE;
      endcase
    end
  end

endmodule
