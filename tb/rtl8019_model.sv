// rtl8019_model: behavioural model of the RTL8019AS Ethernet controller as
// seen from its ISA bus, for testbenches only (not synthesizable).
//
// Models what the gateway's driver uses: the command register (page
// select, remote DMA command, TXP), page 0 registers PSTART, PSTOP, BNRY,
// TPSR/TSR, TBCR, RSAR, RBCR, RCR, TCR, DCR, IMR, page 1 PAR0..5 and CURR,
// the 16 KB buffer RAM at pages 0x40..0x7f, and the data port at offset
// 0x10 for remote DMA reads (wrapping from PSTOP to PSTART) and writes. A
// write takes effect when IOWB rises, a read's side effect when IORB rises;
// read data is driven while IORB is low. Writing TXP captures the frame at
// TPSR/TBCR into tx_bytes/tx_lens/tx_pages (tx_good tells whether the
// send is reported good), keeps TXP set for TX_BUSY cycles and
// sets TSR to 0x01, or to 0x00 while fail_next is above zero (which it then
// decrements). inject() places a received frame in the ring at CURR with
// the 4-byte header (RSR, next page, byte count including 4 CRC bytes) and
// advances CURR. proto_err counts data-port accesses without the matching
// remote DMA command and remote DMA beyond the byte count.
module rtl8019_model #(
  parameter logic [15:0] IO_BASE = 16'h0300,
  parameter int          TX_BUSY = 20
) (
  input  logic        clk,
  input  logic [15:0] sa,
  input  logic [7:0]  sd_in,
  output logic [7:0]  sd_out,
  input  logic        iorb,
  input  logic        iowb
);
  logic [7:0] mem [16384];
  logic [7:0] cr = 8'h21, pstart = 0, pstop = 0, bnry = 0, tpsr = 0, tsr = 0;
  logic [7:0] rcr = 0, tcr = 0, dcr = 0, imr = 8'hff, curr = 0;
  logic [7:0] par [6];
  logic [15:0] tbcr = 0, rsar = 0, rbcr = 0;
  logic prev_r = 1'b1, prev_w = 1'b1;
  int  tx_timer = 0;
  int  fail_next = 0;
  int  proto_err = 0;
  int  n_tx = 0;
  int  reg_writes = 0;
  logic [7:0] tx_bytes [$];
  int tx_lens [$];
  int tx_pages [$];
  bit tx_good [$];

  logic [4:0] off;
  logic [1:0] ps;
  assign off = 5'(sa - IO_BASE);
  assign ps  = cr[7:6];

  function automatic logic [7:0] rdreg();
    if (off == 5'h10) return mem[14'(rsar)];
    if (off == 5'h00) return cr;
    if (ps == 2'd0) begin
      case (off)
        5'h03: return bnry;
        5'h04: return tsr;
        default: return 8'h00;
      endcase
    end else if (ps == 2'd1) begin
      if (off >= 5'h01 && off <= 5'h06) return par[off - 5'h01];
      if (off == 5'h07) return curr;
    end
    return 8'h00;
  endfunction

  assign sd_out = (!iorb) ? rdreg() : 8'h00;

  function automatic logic [15:0] next_addr(input logic [15:0] a);
    logic [15:0] n;
    n = a + 16'd1;
    if (n[15:8] == pstop && pstop != 0) n = {pstart, 8'h00};
    return n;
  endfunction

  always @(posedge clk) begin
    prev_r <= iorb;
    prev_w <= iowb;
    if (tx_timer > 0) begin
      tx_timer <= tx_timer - 1;
      if (tx_timer == 1) cr[2] <= 1'b0;
    end
    // read completes
    if (iorb && !prev_r && off == 5'h10) begin
      if (cr[5:3] != 3'b001 || rbcr == 0) proto_err++;
      rsar <= next_addr(rsar);
      rbcr <= rbcr - 16'd1;
    end
    // write completes
    if (iowb && !prev_w) begin
      reg_writes++;
      if (off == 5'h10) begin
        if (cr[5:3] != 3'b010 || rbcr == 0) proto_err++;
        mem[14'(rsar)] <= sd_in;
        rsar <= rsar + 16'd1;
        rbcr <= rbcr - 16'd1;
      end else if (off == 5'h00) begin
        cr <= {sd_in[7:3], sd_in[2] | cr[2], sd_in[1:0]};
        if (sd_in[2] && !cr[2]) begin
          tx_lens.push_back(int'(tbcr));
          tx_pages.push_back(int'(tpsr));
          for (int i = 0; i < int'(tbcr); i++) tx_bytes.push_back(mem[14'({tpsr, 8'h00} + 16'(i))]);
          n_tx++;
          tx_timer <= TX_BUSY;
          if (fail_next > 0) begin tsr <= 8'h00; fail_next--; tx_good.push_back(1'b0); end
          else begin tsr <= 8'h01; tx_good.push_back(1'b1); end
        end
      end else if (ps == 2'd0) begin
        case (off)
          5'h01: pstart <= sd_in;
          5'h02: pstop  <= sd_in;
          5'h03: bnry   <= sd_in;
          5'h04: tpsr   <= sd_in;
          5'h05: tbcr[7:0]  <= sd_in;
          5'h06: tbcr[15:8] <= sd_in;
          5'h08: rsar[7:0]  <= sd_in;
          5'h09: rsar[15:8] <= sd_in;
          5'h0a: rbcr[7:0]  <= sd_in;
          5'h0b: rbcr[15:8] <= sd_in;
          5'h0c: rcr <= sd_in;
          5'h0d: tcr <= sd_in;
          5'h0e: dcr <= sd_in;
          5'h0f: imr <= sd_in;
          default: ;
        endcase
      end else if (ps == 2'd1) begin
        if (off >= 5'h01 && off <= 5'h06) par[off - 5'h01] <= sd_in;
        if (off == 5'h07) curr <= sd_in;
      end
    end
  end

  // Place a received frame (without CRC) in the receive ring.
  task automatic inject(input logic [7:0] frame [$], input logic [7:0] rsr);
    int total, pages;
    logic [7:0] nxt;
    logic [15:0] a, cnt;
    cnt   = 16'(frame.size() + 4);
    total = 4 + frame.size() + 4;
    pages = (total + 255) / 256;
    nxt   = curr + 8'(pages);
    if (nxt >= pstop) nxt = pstart + (nxt - pstop);
    a = {curr, 8'h00};
    mem[14'(a)] = rsr;       a = next_addr(a);
    mem[14'(a)] = nxt;       a = next_addr(a);
    mem[14'(a)] = cnt[7:0];  a = next_addr(a);
    mem[14'(a)] = cnt[15:8]; a = next_addr(a);
    foreach (frame[i]) begin mem[14'(a)] = frame[i]; a = next_addr(a); end
    for (int i = 0; i < 4; i++) begin mem[14'(a)] = 8'hC0 + 8'(i); a = next_addr(a); end
    curr = nxt;
  endtask
endmodule
