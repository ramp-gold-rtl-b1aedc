// Host-multithreaded functional model of the target cores.
//
// One in-order pipeline executes instructions for NTHREADS target cores,
// each a hardware thread with its own architected state. The thread scheduler
// of the timing model issues a thread id; the instruction then flows through
// five registered stages without any stall or bypass, because a thread never
// has more than one instruction in flight:
//   S0 issue     read PC/nPC/annul/icc/Y of the thread (arch_state)
//   S1 fetch     ITLB translate (when the MMU is on), host I$ lookup
//   S2 decode    host I$ answer, decode, register file read (arch_regfile)
//   S3 execute   ALU and condition codes, branch resolution, address
//                generation, DTLB translate, host D$ lookup, multiply/divide
//   S4 writeback host D$ answer; either commit (register, PC/nPC, icc, Y) or
//                replay, and report the outcome to the timing model
// Anything that cannot finish in one pass -- host I$ or D$ miss, TLB miss,
// multiply/divide, the first pass of a store that needs three register reads,
// a busy memory port -- commits nothing and is reported as a replay; the
// scheduler issues the thread again. wb_valid/wb_ev is registered, one cycle
// after S4. A retired event carries the physical PC and data address that the
// timing model uses for its cache models.
//
// Implemented SPARC V8 subset: SETHI, Bicc (with annul), CALL, JMPL, RDY,
// WRY, ADD/ADDX/SUB/SUBX, AND/ANDN/OR/ORN/XOR/XNOR with or without cc,
// SLL/SRL/SRA, UMUL/SMUL/UDIV/SDIV, LD/LDUB/LDSB/LDUH/LDSH, ST/STB/STH,
// Ticc. A taken Ticc, an
// unimplemented or misaligned instruction, or a divide by zero halts the
// thread (traps are not modelled). One register window per thread.
//
// The split into functional and timing models, host multithreading, the
// unbypassed feed-through pipeline, replays and the host caches and TLBs are
// from the document. The document's pipeline has 13 stages, runs the full
// SPARC V8 ISA with microcode, floating point, precise traps and a
// table-walking MMU; this one is shallower and runs the integer subset above.
// The injector port (inj_*) writes registers and PCs while no thread is in
// flight.
module func_model
  import rg_pkg::*;
#(
  parameter int NTHREADS = 64,
  localparam int TW = $clog2(NTHREADS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   reset_pc,
  input  logic          mmu_en,
  // issue from the thread scheduler
  input  logic          issue_valid,
  input  logic [TW-1:0] issue_tid,
  output logic [NTHREADS-1:0] halted,
  output logic          busy,         // some instruction in flight
  // outcome to the timing model
  output logic          wb_valid,
  output wb_event_t     wb_ev,
  // TLB refill (MMU table walker outside)
  output logic          tlb_miss_valid,
  output logic          tlb_miss_is_d,
  output logic [TW-1:0] tlb_miss_tid,
  output logic [31:0]   tlb_miss_vaddr,
  input  logic          tlb_fill_valid,
  input  logic          tlb_fill_is_d,
  input  logic [TW-1:0] tlb_fill_tid,
  input  logic [19:0]   tlb_fill_vpn,
  input  logic [19:0]   tlb_fill_ppn,
  input  logic          tlb_flush,
  // injector access to architected state
  input  logic          inj_reg_we,
  input  logic          inj_pc_we,
  input  logic          inj_reg_re,
  input  logic [TW-1:0] inj_tid,
  input  logic [4:0]    inj_rd,
  input  logic [31:0]   inj_data,
  output logic [31:0]   inj_rdata,
  // host memory ports (to the crossbar)
  output logic          imem_req_valid,
  output mem_req_t      imem_req,
  input  logic          imem_req_ready,
  output logic          dmem_req_valid,
  output mem_req_t      dmem_req,
  input  logic          dmem_req_ready,
  input  logic          mem_resp_valid,
  input  mem_resp_t     mem_resp
);
  // ------------------------------------------------------------------ types
  typedef struct packed {
    logic          v;
    logic [TW-1:0] tid;
    logic [31:0]   pc, npc, y;
    logic          annul;
    logic [3:0]    icc;
  } s1_t;
  typedef struct packed {
    s1_t           b;
    logic [31:0]   ppc;
    logic          itlb_miss;
  } s2_t;
  typedef struct packed {
    s2_t           b;
    logic [31:0]   inst;
    logic          imiss;
    logic          stash;     // second pass of a three-register store
  } s3_t;
  typedef struct packed {
    s3_t           b;
    logic [31:0]   result;    // value for rd
    logic          rd_we;
    logic [4:0]    rd;
    logic [31:0]   new_npc;
    logic          new_annul;
    logic [3:0]    new_icc;
    logic [31:0]   new_y;
    logic          halt;
    logic          is_load, is_store, is_ctrl, ld_byte, ld_half, ld_sign;
    logic [31:0]   vaddr, paddr;
    logic          dtlb_miss;
    replay_e       early;     // replay cause found before S4
  } s4_t;

  s1_t s1; s2_t s2; s3_t s3; s4_t s4;

  // ------------------------------------------------------------------ S0
  logic [31:0] st_pc, st_npc, st_y;
  logic        st_annul;
  logic [3:0]  st_icc;
  logic        as_we;
  logic [31:0] as_pc, as_npc, as_y;
  logic        as_annul, as_halt;
  logic [3:0]  as_icc;
  logic [TW-1:0] as_tid;

  arch_state #(.NTHREADS(NTHREADS)) u_state (
    .clk, .rst_n, .reset_pc,
    .rtid(issue_tid), .r_pc(st_pc), .r_npc(st_npc), .r_annul(st_annul), .r_icc(st_icc), .r_y(st_y),
    .we(as_we), .wtid(as_tid), .w_pc(as_pc), .w_npc(as_npc), .w_annul(as_annul), .w_icc(as_icc),
    .w_y(as_y), .w_halt(as_halt), .halted);

  // ------------------------------------------------------------------ S1
  logic        itlb_hit;
  logic [31:0] itlb_pa;
  host_tlb #(.NTHREADS(NTHREADS)) u_itlb (
    .clk, .rst_n, .flush(tlb_flush), .lk_tid(s1.tid), .lk_vaddr(s1.pc),
    .lk_hit(itlb_hit), .lk_paddr(itlb_pa),
    .fill_valid(tlb_fill_valid && !tlb_fill_is_d), .fill_tid(tlb_fill_tid),
    .fill_vpn(tlb_fill_vpn), .fill_ppn(tlb_fill_ppn));

  wire [31:0] s1_ppc       = mmu_en ? itlb_pa : s1.pc;
  wire        s1_itlb_miss = mmu_en && !itlb_hit;

  logic        ic_hit;
  logic [31:0] ic_inst;
  host_icache #(.NTHREADS(NTHREADS)) u_icache (
    .clk, .rst_n, .req_valid(s1.v && !s1.annul && !s1_itlb_miss), .req_tid(s1.tid),
    .req_addr(s1_ppc), .rsp_hit(ic_hit), .rsp_inst(ic_inst),
    .mem_req_valid(imem_req_valid), .mem_req(imem_req), .mem_req_ready(imem_req_ready),
    .mem_resp_valid, .mem_resp);

  // ------------------------------------------------------------------ S2
  logic [NTHREADS-1:0] stash_v;
  logic [31:0]         stash_a [NTHREADS];

  wire [31:0] inst2   = ic_inst;
  wire        st2     = inst2[31:30] == 2'b11 && (inst2[24:19] inside {6'h04, 6'h05, 6'h06});
  wire        stash2  = stash_v[s2.b.tid];
  logic [4:0] ra1, ra2;
  always_comb begin
    ra1 = inst2[18:14];
    ra2 = (st2 && (inst2[13] || stash2)) ? inst2[29:25] : inst2[4:0];
    if (inj_reg_re) begin ra1 = inj_rd; ra2 = inj_rd; end
  end

  logic [31:0] rf_a, rf_b;
  logic        rf_we;
  logic [TW-1:0] rf_wtid;
  logic [4:0]  rf_waddr;
  logic [31:0] rf_wdata;
  arch_regfile #(.NTHREADS(NTHREADS)) u_rf (
    .clk, .rst_n, .rtid(inj_reg_re ? inj_tid : s2.b.tid), .raddr1(ra1), .raddr2(ra2),
    .rdata1(rf_a), .rdata2(rf_b),
    .we(rf_we), .wtid(rf_wtid), .waddr(rf_waddr), .wdata(rf_wdata));
  assign inj_rdata = rf_a;

  // ------------------------------------------------------------------ S3
  wire [31:0] in3   = s3.inst;
  wire [1:0]  op    = in3[31:30];
  wire [5:0]  op3   = in3[24:19];
  wire        imm   = in3[13];
  wire [31:0] simm  = {{19{in3[12]}}, in3[12:0]};
  wire [31:0] opb   = imm ? simm : rf_b;
  wire [3:0]  cicc  = s3.b.b.icc;   // N Z V C

  function automatic logic cond_true(input logic [3:0] c, input logic [3:0] f);
    logic n, z, v, cy, r;
    {n, z, v, cy} = f;
    unique case (c[2:0])
      3'd0: r = 1'b0;
      3'd1: r = z;
      3'd2: r = z | (n ^ v);
      3'd3: r = n ^ v;
      3'd4: r = cy | z;
      3'd5: r = cy;
      3'd6: r = n;
      default: r = v;
    endcase
    return c[3] ? !r : r;
  endfunction

  logic [31:0] alu_res;
  logic [3:0]  alu_icc;
  logic        alu_ccwe, alu_ok;
  int_alu u_alu (.op3, .a(rf_a), .b(opb), .cin(cicc[0]), .result(alu_res), .icc_out(alu_icc),
                 .cc_we(alu_ccwe), .valid(alu_ok));

  // multiply / divide
  logic        md_busy, md_done, md_dz, md_start, md_ack;
  logic [TW-1:0] md_tid;
  logic [31:0] md_res, md_y;
  wire  is_md  = op == 2'b10 && (op3 == 6'h0A || op3 == 6'h0B || op3 == 6'h0E || op3 == 6'h0F);
  wire  [1:0] md_op = {op3[2], op3[0]};
  imul_idiv #(.TID_W(TW)) u_md (
    .clk, .rst_n, .start(md_start), .op(md_op), .tid_in(s3.b.b.tid), .a(rf_a), .b(opb),
    .y_in(s3.b.b.y), .busy(md_busy), .done(md_done), .tid(md_tid), .result(md_res),
    .y_out(md_y), .div_zero(md_dz), .ack(md_ack));

  // DTLB
  logic        dtlb_hit;
  logic [31:0] dtlb_pa;
  logic [31:0] eaddr;
  assign eaddr = s3.stash ? stash_a[s3.b.b.tid] : rf_a + opb;
  host_tlb #(.NTHREADS(NTHREADS)) u_dtlb (
    .clk, .rst_n, .flush(tlb_flush), .lk_tid(s3.b.b.tid), .lk_vaddr(eaddr),
    .lk_hit(dtlb_hit), .lk_paddr(dtlb_pa),
    .fill_valid(tlb_fill_valid && tlb_fill_is_d), .fill_tid(tlb_fill_tid),
    .fill_vpn(tlb_fill_vpn), .fill_ppn(tlb_fill_ppn));

  s4_t x;          // S3 result, registered into s4
  logic dc_req;
  logic [31:0] dc_wdata;
  logic [3:0]  dc_wmask;

  always_comb begin
    logic [31:0] pc, npc, target;
    logic taken;
    pc  = s3.b.b.pc;
    npc = s3.b.b.npc;
    x = '0;
    x.b        = s3;
    x.rd       = in3[29:25];
    x.new_npc  = npc + 32'd4;
    x.new_icc  = cicc;
    x.new_y    = s3.b.b.y;
    x.early    = RP_NONE;
    md_start   = 1'b0;
    md_ack     = 1'b0;
    target     = '0;
    taken      = 1'b0;
    if (s3.b.itlb_miss)  x.early = RP_TLB;
    else if (s3.imiss)   x.early = RP_ICACHE;
    if (s3.b.b.v && !s3.b.b.annul && x.early == RP_NONE) begin
      unique case (op)
        2'b01: begin                               // CALL
          x.is_ctrl = 1'b1;
          x.rd_we   = 1'b1; x.rd = 5'd15; x.result = pc;
          x.new_npc = pc + {in3[29:0], 2'b00};
        end
        2'b00: begin
          if (in3[24:22] == 3'b100) begin          // SETHI
            x.rd_we = 1'b1; x.result = {in3[21:0], 10'd0};
          end else if (in3[24:22] == 3'b010) begin // Bicc
            x.is_ctrl = 1'b1;
            taken     = cond_true(in3[28:25], cicc);
            target    = pc + {{8{in3[21]}}, in3[21:0], 2'b00};
            if (taken) x.new_npc = target;
            x.new_annul = in3[29] && (!taken || in3[28:25] == 4'b1000);
          end else x.halt = 1'b1;                  // UNIMP and others
        end
        2'b10: begin
          if (alu_ok && op3 != 6'h09 && op3 != 6'h0D && op3 != 6'h19 && op3 != 6'h1D) begin
            x.rd_we = 1'b1; x.result = alu_res;
            if (alu_ccwe) x.new_icc = alu_icc;
          end else if (is_md) begin
            if (md_done && md_tid == s3.b.b.tid) begin
              md_ack = 1'b1;
              if (md_dz) x.halt = 1'b1;
              else begin
                x.rd_we = 1'b1; x.result = md_res; x.new_y = md_y;
              end
            end else begin
              md_start = !md_busy;
              x.early  = RP_MULDIV;
            end
          end else if (op3 == 6'h28) begin         // RDY
            x.rd_we = 1'b1; x.result = s3.b.b.y;
          end else if (op3 == 6'h30) begin         // WRY
            x.new_y = rf_a ^ opb;
          end else if (op3 == 6'h38) begin         // JMPL
            x.is_ctrl = 1'b1;
            x.rd_we = 1'b1; x.result = pc;
            x.new_npc = eaddr;
            if (eaddr[1:0] != 2'b00) x.halt = 1'b1;
          end else if (op3 == 6'h3A) begin         // Ticc
            if (cond_true(in3[28:25], cicc)) x.halt = 1'b1;
          end else x.halt = 1'b1;
        end
        default: begin                             // memory
          // LD LDUB LDUH LDSB LDSH / ST STB STH
          x.ld_byte  = op3 == 6'h01 || op3 == 6'h09;
          x.ld_half  = op3 == 6'h02 || op3 == 6'h0A;
          x.ld_sign  = op3 == 6'h09 || op3 == 6'h0A;
          x.is_load  = op3 inside {6'h00, 6'h01, 6'h02, 6'h09, 6'h0A};
          x.is_store = op3 inside {6'h04, 6'h05, 6'h06};
          if (!x.is_load && !x.is_store) x.halt = 1'b1;
          else if (x.is_store && !imm && !s3.stash) begin
            x.early = RP_STORE3;                   // needs rs1, rs2 and rd
          end else begin
            if ((op3 == 6'h00 || op3 == 6'h04) && eaddr[1:0] != 2'b00) x.halt = 1'b1;
            if ((op3 == 6'h02 || op3 == 6'h0A || op3 == 6'h06) && eaddr[0]) x.halt = 1'b1;
            x.rd_we = x.is_load;
          end
        end
      endcase
      if (x.halt) begin x.rd_we = 1'b0; x.is_load = 1'b0; x.is_store = 1'b0; end
    end
    x.vaddr     = eaddr;
    x.dtlb_miss = mmu_en && !dtlb_hit;
    x.paddr     = mmu_en ? dtlb_pa : eaddr;
    if (x.early == RP_NONE && (x.is_load || x.is_store) && x.dtlb_miss) x.early = RP_TLB;
    dc_req   = s3.b.b.v && x.early == RP_NONE && (x.is_load || x.is_store);
    dc_wdata = (op3 == 6'h05) ? {4{rf_b[7:0]}} : (op3 == 6'h06) ? {2{rf_b[15:0]}} : rf_b;
    dc_wmask = (op3 == 6'h05) ? (4'b1000 >> x.paddr[1:0]) :
               (op3 == 6'h06) ? (x.paddr[1] ? 4'b0011 : 4'b1100) : 4'b1111;
  end

  logic        dc_hit, dc_busy;
  logic [31:0] dc_rdata;
  host_dcache #(.NTHREADS(NTHREADS)) u_dcache (
    .clk, .rst_n, .req_valid(dc_req), .req_tid(s3.b.b.tid),
    .req_addr(x.is_store ? x.paddr : {x.paddr[31:2], 2'b00}),
    .req_store(x.is_store), .req_wdata(dc_wdata), .req_wmask(dc_wmask),
    .rsp_valid(), .rsp_hit(dc_hit), .rsp_busy(dc_busy), .rsp_rdata(dc_rdata),
    .mshr_busy(),
    .mem_req_valid(dmem_req_valid), .mem_req(dmem_req), .mem_req_ready(dmem_req_ready),
    .mem_resp_valid, .mem_resp);

  // ------------------------------------------------------------------ S4
  replay_e rp;
  logic    commit;
  logic [31:0] ldval;
  always_comb begin
    rp = s4.early;
    if (rp == RP_NONE && (s4.is_load || s4.is_store) && !dc_hit)
      rp = dc_busy ? RP_MEM : RP_DCACHE;
    commit = s4.b.b.b.v && rp == RP_NONE;
    ldval  = dc_rdata;
    if (s4.ld_byte) begin
      logic [7:0] bt;
      bt    = dc_rdata[31 - 8*s4.paddr[1:0] -: 8];
      ldval = {{24{s4.ld_sign & bt[7]}}, bt};
    end else if (s4.ld_half) begin
      logic [15:0] hw;
      hw    = s4.paddr[1] ? dc_rdata[15:0] : dc_rdata[31:16];
      ldval = {{16{s4.ld_sign & hw[15]}}, hw};
    end
  end

  always_comb begin
    as_we    = commit || inj_pc_we;
    as_tid   = commit ? s4.b.b.b.tid : inj_tid;
    if (commit) begin
      if (s4.b.b.b.annul) begin
        as_pc = s4.b.b.b.npc; as_npc = s4.b.b.b.npc + 32'd4; as_annul = 1'b0;
        as_icc = s4.b.b.b.icc; as_y = s4.b.b.b.y; as_halt = 1'b0;
      end else begin
        as_pc = s4.b.b.b.npc; as_npc = s4.new_npc; as_annul = s4.new_annul;
        as_icc = s4.new_icc; as_y = s4.new_y; as_halt = s4.halt;
      end
    end else begin
      as_pc = inj_data; as_npc = inj_data + 32'd4; as_annul = 1'b0;
      as_icc = '0; as_y = '0; as_halt = 1'b0;
    end
    rf_we    = (commit && !s4.b.b.b.annul && s4.rd_we) || inj_reg_we;
    rf_wtid  = commit ? s4.b.b.b.tid : inj_tid;
    rf_waddr = commit ? s4.rd : inj_rd;
    rf_wdata = commit ? (s4.is_load ? ldval : s4.result) : inj_data;
  end

  assign busy = s1.v || s2.b.v || s3.b.b.v || s4.b.b.b.v || wb_valid;

  // ------------------------------------------------------------------ pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0; s4 <= '0;
      wb_valid <= 1'b0; wb_ev <= '0;
      tlb_miss_valid <= 1'b0; tlb_miss_is_d <= 1'b0; tlb_miss_tid <= '0; tlb_miss_vaddr <= '0;
      stash_v <= '0;
      for (int t = 0; t < NTHREADS; t++) stash_a[t] <= '0;
    end else begin
      s1.v     <= issue_valid;
      s1.tid   <= issue_tid;
      s1.pc    <= st_pc;
      s1.npc   <= st_npc;
      s1.y     <= st_y;
      s1.annul <= st_annul;
      s1.icc   <= st_icc;

      s2.b         <= s1;
      s2.ppc       <= s1_ppc;
      s2.itlb_miss <= s1.v && !s1.annul && s1_itlb_miss;

      s3.b     <= s2;
      s3.inst  <= inst2;
      s3.imiss <= s2.b.v && !s2.b.annul && !s2.itlb_miss && !ic_hit;
      s3.stash <= stash2;

      s4 <= x;

      // three-register store: remember the address between the two passes
      if (s3.b.b.v && x.early == RP_STORE3) begin
        stash_v[s3.b.b.tid] <= 1'b1;
        stash_a[s3.b.b.tid] <= eaddr;
      end
      if (commit && s4.is_store) stash_v[s4.b.b.b.tid] <= 1'b0;
      if (inj_pc_we)             stash_v[inj_tid]      <= 1'b0;

      wb_valid        <= s4.b.b.b.v;
      wb_ev.tid       <= s4.b.b.b.tid;
      wb_ev.replay    <= rp;
      wb_ev.pc        <= s4.b.b.ppc;
      wb_ev.paddr     <= s4.paddr;
      wb_ev.is_load   <= s4.is_load && !s4.b.b.b.annul;
      wb_ev.is_store  <= s4.is_store && !s4.b.b.b.annul;
      wb_ev.is_ctrl   <= s4.is_ctrl && !s4.b.b.b.annul;
      wb_ev.halt      <= s4.halt && !s4.b.b.b.annul;

      tlb_miss_valid  <= s4.b.b.b.v && s4.early == RP_TLB;
      tlb_miss_is_d   <= !s4.b.b.itlb_miss;
      tlb_miss_tid    <= s4.b.b.b.tid;
      tlb_miss_vaddr  <= s4.b.b.itlb_miss ? s4.b.b.b.pc : s4.vaddr;
    end
  end
endmodule
