// tb_mbp_protocol: the coherence transactions whose times are published for
// MBP-light, plus a write under the update policy, run on the whole chip at
// its default size.
//
// The chip is the home cluster of the memory lines. Its program keeps a
// small directory in internal memory: for each line, a sharer bitmap at
// address line and an owner word at address line + 32 (0 = the home copy is
// valid, 0x100 | cluster = a remote cluster holds the only valid copy). The
// test plays the local L2 caches, the cluster memory and the remote
// clusters (a remote cluster answers a read with a data packet and an
// invalidation with an ack, after NET_DELAY cycles).
//   1. Read miss, home line valid: the line is read from cluster memory into
//      a PBR and sent to the L2 cache as the reply.
//   2. Read miss, home line invalid: the request is forwarded over the
//      network to the owner. When the owner's data packet arrives, the core
//      writes it to cluster memory as update data, replies to the waiting L2
//      cache with it and marks the home copy valid again.
//   3. Invalidation: a write to a line with three sharers updates cluster
//      memory, multicasts invalidations, and replies to the L2 cache once the
//      hardware has counted all three acks.
//   4. L3 cache hit: a read of a line whose home is another cluster, found
//      in the part of the cluster memory used as an L3 cache (a tag per set
//      in internal memory; the tag layout is this program's own).
//   5. Update policy: a line marked for update gets the written data
//      multicast to its sharers instead of an invalidation; they stay
//      sharers. This shows the protocol choice made in software.
// Each transaction is timed from the cycle the request enters the chip to
// the cycle the reply leaves it. The published times include the remote
// clusters and the network, which are not modelled here. So the check is a
// bound: the time spent in this chip, with the modelled network delay taken
// out, must stay below the published time at the 50 MHz clock (20 ns per
// cycle). The times are printed.
`timescale 1ns/1ps
module tb_mbp_protocol;
  import mbp_pkg::*;
  import mbp_asm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  localparam logic [7:0] ME = 8'h21, OWNER = 8'h4C;
  localparam int NET_DELAY = 30;
  localparam int NS_PER_CYCLE = 20;

  logic halted;
  logic imem_en; pc_t imem_addr; instr_t imem_rdata;
  logic lm_en, lm_we; word_t lm_addr, lm_wdata, lm_rdata;
  logic req_valid = 0, req_ready; pbr_t req_pkt = '0;
  logic rep_valid, rep_ready; pbr_t rep_pkt;
  logic cm_en, cm_we; word_t cm_addr; logic [63:0] cm_wdata, cm_rdata;
  logic tx_valid, tx_ready; pbr_t tx_pkt; logic [7:0] tx_dest;
  logic rx_valid, rx_ready; pbr_t rx_pkt;

  mbp_light dut (
    .clk, .rst, .cluster_id (ME), .halted,
    .imem_en, .imem_addr, .imem_rdata,
    .lm_en, .lm_we, .lm_addr, .lm_wdata, .lm_rdata,
    .req_valid, .req_ready, .req_pkt, .rep_valid, .rep_ready, .rep_pkt,
    .cm_en, .cm_we, .cm_addr, .cm_wdata, .cm_rdata,
    .tx_valid, .tx_ready, .tx_pkt, .tx_dest, .rx_valid, .rx_ready, .rx_pkt
  );

  // ------------------------------------------------------------ memories
  instr_t prog [1024];
  word_t  lmem [1024];
  logic [63:0] cmem [256];
  always_ff @(posedge clk) begin
    if (imem_en) imem_rdata <= prog[imem_addr];
    if (lm_en) begin
      if (lm_we) lmem[lm_addr[9:0]] <= lm_wdata; else lm_rdata <= lmem[lm_addr[9:0]];
    end
    if (cm_en) begin
      if (cm_we) cmem[cm_addr[7:0]] <= cm_wdata; else cm_rdata <= cmem[cm_addr[7:0]];
    end
  end

  // ------------------------------------------------------------ L2 side and timing
  pbr_t replies [$];
  int cyc = 0, t_req = 0, t_rep = 0;
  int n_instr = 0;
  int cls_n [16] = '{default: 0};   // instructions completed, by class
  assign rep_ready = 1'b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (req_valid && req_ready) t_req <= cyc;
    if (!rst && rep_valid && rep_ready) begin replies.push_back(rep_pkt); t_rep <= cyc; end
    if (!rst && dut.u_core.x_go) begin
      n_instr <= n_instr + 1;
      cls_n[dut.u_core.cls] <= cls_n[dut.u_core.cls] + 1;
    end
  end

  // dynamic instruction mix by class, printed next to the published mix
  // (percent of all instructions executed by the protocol handlers on five
  // SPLASH-2 programs; tenths of a percent, index = class code)
  localparam int PUB_MIX [14] = '{45, 79, 268, 150, 60, 104, 79, 19, 34, 2, 93, 52, 5, 6};
  localparam string CLS_NAME [14] = '{"NOP", "WGG", "WGI", "WPG", "BPI", "MPP", "BRANCH",
                                      "TJ", "LMA", "IMA", "MMC", "RDT", "INT", "SPE"};
  task automatic print_mix();
    int total = 0;
    for (int c = 0; c < 14; c++) total += cls_n[c];
    $display("class    this test %%   published %%");
    for (int c = 0; c < 14; c++)
      $display("%-7s  %5.1f         %5.1f", CLS_NAME[c], 100.0 * cls_n[c] / total, PUB_MIX[c] / 10.0);
  endtask
  task automatic l2_request(pbr_t p);
    @(negedge clk); req_valid = 1; req_pkt = p;
    @(posedge clk iff req_ready); #1 req_valid = 0;
  endtask

  // ------------------------------------------------------------ remote clusters
  pbr_t sent [$]; logic [7:0] sent_dest [$];
  pbr_t inbox [$]; int due [$];
  assign tx_ready = 1'b1;
  always @(posedge clk) begin
    if (!rst && tx_valid && tx_ready) begin
      sent.push_back(tx_pkt); sent_dest.push_back(tx_dest);
      if (pbr_byte(tx_pkt, 4'd0) inside {PT_INVAL, PT_WRITE}) begin
        inbox.push_back(pk(PT_ACK, tx_dest, ME, pbr_word(tx_pkt, 4'd3), 24'h0, 4'h0));
        due.push_back(cyc + NET_DELAY);
      end
      if (pbr_byte(tx_pkt, 4'd0) == PT_READ) begin
        inbox.push_back(pk(PT_DATA, tx_dest, ME, pbr_word(tx_pkt, 4'd3), 24'h0DA7A5, 4'h0));
        due.push_back(cyc + NET_DELAY);
      end
    end
    if (rx_valid && rx_ready) rx_valid <= 1'b0;
    else if (!rx_valid && inbox.size() > 0 && due[0] <= cyc) begin
      rx_pkt   <= inbox.pop_front();
      void'(due.pop_front());
      rx_valid <= 1'b1;
    end
  end
  initial begin rx_valid = 1'b0; rx_pkt = '0; end

  function automatic pbr_t pk(logic [7:0] ty, logic [7:0] src, logic [7:0] dst,
                              logic [15:0] line, logic [23:0] data, logic [3:0] tag);
    return {ty, src, dst, line, data, tag};
  endfunction

  // ------------------------------------------------------------ protocol program
  int pa;
  task automatic emit(instr_t i); prog[pa] = i; pa++; endtask
  localparam int H_MMC = 'h100, H_TBL = 'h110, H_RD = 'h120, H_FWD = 'h130, H_WR = 'h150,
                 H_BAD = 'h170, H_RDT = 'h180, H_DATA = 'h190, H_ACK = 'h1C0, H_L3 = 'h1E0;
  localparam int OWN = 32, SAVE = 62;   // owner table offset, saved request PBR
  localparam int UPDATE = 'h200;        // owner-word flag: update policy for this line
  localparam int L3_TAGS = 'hC0, L3_LINES = 'h80;
  int idle, fix;

  // registers: r15 = 0, r1 = packet PBR, r2 = type, r7 = line
  task automatic load_program();
    for (int i = 0; i < 1024; i++) prog[i] = NOP();
    pa = 0;     emit(BR(BR_ALWAYS, 0, 'h40));
    pa = 'h10;  emit(BR(BR_ALWAYS, 0, H_MMC));
    pa = 'h20;  emit(BR(BR_ALWAYS, 0, H_RDT));
    pa = 'h30;  emit(BR(BR_ALWAYS, 0, H_ACK));
    pa = 'h40;
    emit(LI(15, 0));
    // line 0x05: owned by cluster OWNER; line 0x09: sharers 0x41, 0x43, 0x4A
    emit(LI(7, 5));    emit(LI(5, 'h100 | OWNER)); emit(IST(5, 7, OWN));
    emit(LI(7, 9));    emit(LI(5, 'h205));        emit(WGI(F_SLL, 5, 1)); emit(IST(5, 7, 0));
    // line 0x0B: update policy, sharers 0x45, 0x46
    emit(LI(7, 'h0B)); emit(LI(5, 'h060)); emit(IST(5, 7, 0));
    emit(LI(5, UPDATE)); emit(IST(5, 7, OWN));
    // L3: line 0x4C10 (home cluster 0x4C) is cached in set 0x10
    emit(LI(5, 'h4C)); emit(WGI(F_SLL, 5, 8)); emit(WGI(F_OR, 5, 'h10));
    emit(LI(9, L3_TAGS + 'h10)); emit(IST(5, 9, 0));
    emit(INT(INT_EI));
    idle = pa;
    emit(SPE(SPE_HALT, 0)); emit(BR(BR_ALWAYS, 0, idle));
    // L2 request: dispatch on the packet type
    pa = H_MMC;
    emit(SPE(SPE_MFIR, 1)); emit(WGI(F_AND, 1, 'h7F));
    emit(LDPG(2, 1, 0)); emit(WGI(F_SRL, 2, 8));
    emit(LDPG(7, 1, 3));
    emit(TJ(3, 2, H_TBL));
    pa = H_TBL;
    emit(BR(BR_ALWAYS, 0, H_BAD)); emit(BR(BR_ALWAYS, 0, H_RD)); emit(BR(BR_ALWAYS, 0, H_WR));
    for (int i = 3; i < 8; i++) emit(BR(BR_ALWAYS, 0, H_BAD));
    // read: home copy valid -> line into PBR 2 and reply; else forward
    pa = H_RD;
    emit(WGG(F_MOV, 8, 7)); emit(WGI(F_SRL, 8, 8)); emit(BR(BR_NEZ, 8, H_L3));
    emit(ILD(8, 7, OWN)); emit(BR(BR_NEZ, 8, H_FWD));
    emit(LI(6, 2)); emit(MMC(MMC_MRD, 6, 7)); emit(MMC(MMC_REPLY, 6, 0));
    emit(MMC(MMC_REL, 15, 0)); emit(INT(INT_RETI));
    // forward the read to the owner: PBR 0 = request with source ME, dest owner
    pa = H_FWD;
    emit(IST(1, 15, SAVE));
    emit(LI(4, 0)); emit(MVLPP(4, 1));
    emit(SPE(SPE_MFID, 9)); emit(WGI(F_SLL, 9, 8));
    emit(WGI(F_AND, 8, 'hFF)); emit(WGG(F_OR, 9, 8));
    emit(STPG(9, 4, 1));
    emit(RDT(RDT_SEND, 4, 0));
    emit(INT(INT_RETI));
    // write: update memory, then invalidate the sharers (or reply at once)
    pa = H_WR;
    emit(MMC(MMC_MWR, 1, 7));
    emit(IST(1, 15, SAVE));
    emit(ILD(5, 7, 0));
    emit(BR(BR_EQZ, 5, H_ACK));
    emit(LI(4, 0)); emit(MVLPP(4, 1));
    emit(BPI(BPI_MOV, 4, 2, 'h40));
    // update policy: send the write itself to the sharers, else invalidate
    emit(ILD(8, 7, OWN)); emit(WGI(F_AND, 8, UPDATE));
    fix = pa; pa++;
    emit(BPI(BPI_MOV, 4, 0, PT_INVAL));
    prog[fix] = BR(BR_NEZ, 8, pa);
    emit(RDT(RDT_MCAST, 4, 5));
    emit(INT(INT_RETI));
    pa = H_BAD;
    emit(LI(1, 'hBAD)); emit(ST(1, 15, 0)); emit(INT(INT_RETI));
    // network packet: data from an owner, or an invalidation to acknowledge
    pa = H_RDT;
    emit(SPE(SPE_MFIR, 1)); emit(WGI(F_AND, 1, 'h7F));
    emit(LDPG(2, 1, 0)); emit(WGI(F_SRL, 2, 8));
    emit(WGI(F_XOR, 2, PT_DATA)); emit(BR(BR_EQZ, 2, H_DATA));
    emit(RDT(RDT_ACK, 1, 0)); emit(RDT(RDT_REL, 15, 0)); emit(INT(INT_RETI));
    // owner's data: update cluster memory, reply to L2, home copy valid again
    pa = H_DATA;
    emit(LDPG(7, 1, 3));
    emit(MMC(MMC_MWR, 1, 7));
    emit(BPI(BPI_MOV, 1, 0, PT_REPLY));
    emit(MMC(MMC_REPLY, 1, 0));
    emit(IST(15, 7, OWN));
    emit(MMC(MMC_REL, 15, 0));   // waits for the MMC: the reply is sent from this PBR
    emit(RDT(RDT_REL, 15, 0));
    emit(INT(INT_RETI));
    // all acks in (or no sharers): reply to the write; under invalidation
    // the sharers are gone, under update they keep their copies
    pa = H_ACK;
    emit(ILD(1, 15, SAVE)); emit(LDPG(7, 1, 3));
    emit(ILD(8, 7, OWN)); emit(WGI(F_AND, 8, UPDATE));
    fix = pa; pa++;
    emit(IST(15, 7, 0));
    prog[fix] = BR(BR_NEZ, 8, pa);
    emit(BPI(BPI_MOV, 1, 0, PT_REPLY));
    emit(MMC(MMC_REPLY, 1, 0)); emit(MMC(MMC_REL, 15, 0)); emit(INT(INT_RETI));
    // line of another home: hit if the L3 tag of its set matches, then the
    // copy in the cluster memory's L3 area is the reply
    pa = H_L3;
    emit(WGG(F_MOV, 9, 7)); emit(WGI(F_AND, 9, 'h3F)); emit(WGI(F_ADD, 9, L3_TAGS));
    emit(ILD(10, 9, 0)); emit(WGG(F_XOR, 10, 7)); emit(BR(BR_NEZ, 10, H_BAD));
    emit(WGI(F_XOR, 9, L3_TAGS ^ L3_LINES));
    emit(LI(6, 2)); emit(MMC(MMC_MRD, 6, 9)); emit(MMC(MMC_REPLY, 6, 0));
    emit(MMC(MMC_REL, 15, 0)); emit(INT(INT_RETI));
  endtask

  // run one transaction and check its time against the published one
  task automatic timed(string what, pbr_t req, int n_replies, int net_trips, int published_ns);
    int in_chip, instr0;
    instr0 = n_instr;
    l2_request(req);
    wait (replies.size() == n_replies);
    @(posedge clk); @(posedge clk);
    in_chip = t_rep - t_req - net_trips * NET_DELAY;
    $display("%s: %0d cycles in the chip (%0d ns at 50 MHz), %0d instructions; published %0d ns",
             what, in_chip, in_chip * NS_PER_CYCLE, n_instr - instr0, published_ns);
    check({what, " within published time"}, 128'(in_chip * NS_PER_CYCLE < published_ns), 128'd1);
    wait (halted);
  endtask

  initial begin
    load_program();
    for (int i = 0; i < 1024; i++) lmem[i] = '0;
    for (int i = 0; i < 256; i++) cmem[i] = {32'hC0DE0000, 32'(i)};
    repeat (3) @(posedge clk); rst <= 1'b0;
    wait (halted);

    // ---- 1: read miss, home copy valid (published 5.9 us on the MBP core)
    timed("read miss, home valid", pk(PT_READ, 8'h01, ME, 16'h0003, 24'h0, 4'h0), 1, 0, 5900);
    check("reply is the memory line", 128'(replies[0]), 128'({64'hC0DE0000_00000003, 4'h0}));
    check("nothing sent to the network", 128'(sent.size()), 128'd0);

    // ---- 2: read miss, home copy invalid (published 14.0 us)
    timed("read miss, home invalid", pk(PT_READ, 8'h02, ME, 16'h0005, 24'h0, 4'h0), 2, 1, 14000);
    check("request forwarded", 128'(sent.size()), 128'd1);
    check("forward dest", 128'(sent_dest[0]), 128'(OWNER));
    check("forward packet", 128'(sent[0]), 128'(pk(PT_READ, ME, OWNER, 16'h0005, 24'h0, 4'h0)));
    check("reply carries the owner's data", 128'(replies[1]),
          128'(pk(PT_REPLY, OWNER, ME, 16'h0005, 24'h0DA7A5, 4'h0)));
    check("update data in cluster memory", 128'(cmem[5]),
          128'(pk(PT_DATA, OWNER, ME, 16'h0005, 24'h0DA7A5, 4'h0) >> 4));
    check("directory: home copy valid again", 128'(dut.u_core.u_imem_int.mem[5 + OWN]), 128'd0);

    // ---- 3: read the same line again: now served from home
    timed("read again, home valid", pk(PT_READ, 8'h03, ME, 16'h0005, 24'h0, 4'h0), 3, 0, 5900);
    check("second read from memory", 128'(replies[2]), 128'({cmem[5], 4'h0}));
    check("still one network packet", 128'(sent.size()), 128'd1);

    // ---- 4: invalidation of three sharers (published 11.0 us)
    timed("invalidation", pk(PT_WRITE, 8'h01, ME, 16'h0009, 24'h777777, 4'h0), 4, 1, 11000);
    check("three invalidations", 128'(sent.size()), 128'd4);
    check("inval dests", 128'({sent_dest[1], sent_dest[2], sent_dest[3]}), 128'({8'h41, 8'h43, 8'h4A}));
    check("write reply", 128'(replies[3]), 128'(pk(PT_REPLY, 8'h01, ME, 16'h0009, 24'h777777, 4'h0)));
    check("directory: sharers cleared", 128'(dut.u_core.u_imem_int.mem[9]), 128'd0);

    // ---- 5: L3 cache hit on a line whose home is cluster 0x4C (published 760 ns)
    timed("L3 cache hit", pk(PT_READ, 8'h02, ME, 16'h4C10, 24'h0, 4'h0), 5, 0, 760);
    check("L3 reply is the cached copy", 128'(replies[4]), 128'({cmem[8'h90], 4'h0}));
    check("L3 hit sends nothing", 128'(sent.size()), 128'd4);

    // ---- 6: write to a line under the update policy
    timed("update of two sharers", pk(PT_WRITE, 8'h03, ME, 16'h000B, 24'h5A5A5A, 4'h0), 6, 1, 11000);
    check("two updates", 128'(sent.size()), 128'd6);
    check("update dests", 128'({sent_dest[4], sent_dest[5]}), 128'({8'h45, 8'h46}));
    check("update carries the data", 128'(sent[5]), 128'(pk(PT_WRITE, 8'h03, 8'h46, 16'h000B, 24'h5A5A5A, 4'h0)));
    check("update reply", 128'(replies[5]), 128'(pk(PT_REPLY, 8'h03, ME, 16'h000B, 24'h5A5A5A, 4'h0)));
    check("directory: sharers kept", 128'(dut.u_core.u_imem_int.mem['h0B]), 128'h060);
    print_mix();
    check("PBR operand classes in use", 128'(cls_n[C_WPG] > 0 && cls_n[C_MPP] > 0 && cls_n[C_BPI] > 0), 128'd1);
    check("no bad packet type seen", 128'(lmem[0]), 128'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
