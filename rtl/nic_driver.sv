// nic_driver: drives the RTL8019AS Ethernet controller over its ISA bus.
//
// Every register access is one isa_master cycle. After reset the driver
// writes the initialisation sequence (command register 0x21: page 0, stop;
// PSTART 0x4c, PSTOP 0x80, BNRY 0x4c, TPSR 0x45, RCR 0xcc, TCR 0xe0,
// DCR 0xc8, IMR 0x00; on page 1 the station address MAC and CURR 0x4d;
// finally 0x22: page 0, start). Then it loops:
//  * Send, when the packer offers a frame: the frame is copied by remote
//    DMA (RBCR, RSAR, command 0x12, one data-port write per byte) into one
//    of two transmit buffers of the controller, page 0x45 or 0x40 chosen by
//    txd_buffer_select, which alternates after every good send. The
//    transmit command (TPSR, TBCR, command 0x26) hands it to the
//    controller's local DMA; the driver polls the command register until
//    TXP clears and reads TSR. TSR = 0x01 is success; otherwise the send is
//    repeated, remote DMA included, up to 6 times, after which the frame is
//    dropped (tx_fail).
//  * Otherwise, receive polling: BNRY (page 0) and CURR (page 1) are read.
//    When the page after BNRY equals CURR (BNRY = CURR - 1 in the ring)
//    there is no new packet. Else 18 bytes are read by remote DMA from that
//    page: the controller's 4-byte header (RSR, next page, byte count) and
//    the 14-byte Ethernet header. RSR other than 0x01 is a receive error.
//    An IP frame (type 0x0800) has its payload read (byte count less 18
//    for the Ethernet header and CRC) and streamed to the unpacker;
//    ARP (0x0806) and other frames carry no port data and are only
//    released. In every case BNRY is then set to the page before the next-
//    packet pointer, which frees the ring space.
// The register values, the BNRY/CURR test, the 18-byte header read, the
// RSR and TSR checks, the ARP/IP filter, the two transmit buffers and the
// 6 repeats follow the design. The page-1 switch for CURR and the station
// address, the second transmit page 0x40, freeing the ring after a receive
// error and the payload layout are this design's choices.
module nic_driver
  import gateway_pkg::*;
#(
  parameter logic [47:0] MAC     = 48'h0200_0000_0001,
  parameter int unsigned FB_AW   = 11,
  parameter logic [15:0] IO_BASE = 16'h0300,
  parameter int unsigned SETUP   = 1,
  parameter int unsigned STROBE  = 4,
  parameter int unsigned HOLD    = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // frame from the packer
  input  logic             frame_valid,
  input  logic [FB_AW-1:0] frame_len,
  output logic [FB_AW-1:0] fb_raddr,
  input  logic [7:0]       fb_rdata,
  output logic             frame_done,
  // payload to the unpacker
  output logic             pl_start,
  output logic             pl_valid,
  output logic [7:0]       pl_data,
  input  logic             pl_ready,
  // ISA bus
  output logic [15:0]      sa,
  output logic [7:0]       sd_o,
  output logic             sd_oe,
  input  logic [7:0]       sd_i,
  output logic             iorb,
  output logic             iowb,
  // events and status
  output logic             init_done,
  output logic             tx_ok,
  output logic             tx_retry,
  output logic             tx_fail,
  output logic             rx_frame,
  output logic             rx_error,
  output logic             rx_other,
  output logic             txd_buffer_select
);
  typedef enum logic [4:0] {
    S_INIT, S_IDLE,
    S_RX_BNRY, S_RX_P1, S_RX_CURR, S_RX_P0, S_RX_CHK,
    S_RX_HSET, S_RX_HRD, S_RX_HEND, S_RX_DEC,
    S_RX_PSET, S_RX_PRD, S_RX_PEND, S_RX_FREE,
    S_TX_SET, S_TX_DAT, S_TX_END, S_TX_CMD, S_TX_POLL, S_TX_TSR, S_TX_DONE
  } state_t;
  typedef enum logic [1:0] {PH_ISSUE, PH_WAIT, PH_PUSH} phase_t;

  state_t      state;
  phase_t      phase;
  logic [10:0] idx;
  logic [7:0]  curr, nextp, tx_page;
  logic [7:0]  hdr [18];
  logic [15:0] plen;
  logic [2:0]  attempts;

  // current ISA operation
  logic        op_we, op_req;
  logic [4:0]  op_off;
  logic [7:0]  op_wdata;
  logic        isa_done, isa_busy;
  logic [7:0]  isa_rdata;

  cr_t         cr_rd;
  logic [7:0]  rsr, nxt;
  assign cr_rd  = cr_t'(isa_rdata);
  logic [15:0] rcount, etype;
  assign rsr    = hdr[0];
  assign nxt    = hdr[1];
  assign rcount = {hdr[3], hdr[2]};
  assign etype  = {hdr[16], hdr[17]};

  assign tx_page  = txd_buffer_select ? TX_PAGE1 : TX_PAGE0;
  assign fb_raddr = idx[FB_AW-1:0];

  function automatic logic [12:0] init_op(input logic [10:0] i);  // {off, data}
    unique case (i)
      11'd0:  return {REG_CR,     CR_INIT_STOP};
      11'd1:  return {REG_PSTART, PSTART_PAGE};
      11'd2:  return {REG_PSTOP,  PSTOP_PAGE};
      11'd3:  return {REG_BNRY,   BNRY_INIT};
      11'd4:  return {REG_TPSR,   TPSR_INIT};
      11'd5:  return {REG_RCR,    RCR_INIT};
      11'd6:  return {REG_TCR,    TCR_INIT};
      11'd7:  return {REG_DCR,    DCR_INIT};
      11'd8:  return {REG_IMR,    IMR_INIT};
      11'd9:  return {REG_CR,     CR_P1_STOP};
      11'd10: return {REG_PAR0,        MAC[47:40]};
      11'd11: return {REG_PAR0 + 5'd1, MAC[39:32]};
      11'd12: return {REG_PAR0 + 5'd2, MAC[31:24]};
      11'd13: return {REG_PAR0 + 5'd3, MAC[23:16]};
      11'd14: return {REG_PAR0 + 5'd4, MAC[15:8]};
      11'd15: return {REG_PAR0 + 5'd5, MAC[7:0]};
      11'd16: return {REG_CURR,   CURR_INIT};
      default: return {REG_CR,    CR_START};
    endcase
  endfunction
  localparam logic [10:0] INIT_LAST = 11'd17;

  // operation of each state
  always_comb begin
    op_req   = 1'b0;
    op_we    = 1'b1;
    op_off   = REG_CR;
    op_wdata = CR_START;
    unique case (state)
      S_INIT:    begin op_req = 1'b1; {op_off, op_wdata} = init_op(idx); end
      S_RX_BNRY: begin op_req = 1'b1; op_we = 1'b0; op_off = REG_BNRY; end
      S_RX_P1:   begin op_req = 1'b1; op_wdata = CR_P1_START; end
      S_RX_CURR: begin op_req = 1'b1; op_we = 1'b0; op_off = REG_CURR; end
      S_RX_P0, S_RX_HEND, S_RX_PEND, S_TX_END: op_req = 1'b1;
      S_RX_HSET: begin
        op_req = 1'b1;
        unique case (idx[2:0])
          3'd0: {op_off, op_wdata} = {REG_RSAR0, 8'h00};
          3'd1: {op_off, op_wdata} = {REG_RSAR1, nextp};
          3'd2: {op_off, op_wdata} = {REG_RBCR0, 8'(NIC_HDR_BYTES + ETH_HDR_BYTES)};
          3'd3: {op_off, op_wdata} = {REG_RBCR1, 8'h00};
          default: {op_off, op_wdata} = {REG_CR, CR_RD_READ};
        endcase
      end
      S_RX_HRD, S_RX_PRD: begin op_req = 1'b1; op_we = 1'b0; op_off = REG_DATA; end
      S_RX_PSET: begin
        op_req = 1'b1;
        unique case (idx[2:0])
          3'd0: {op_off, op_wdata} = {REG_RSAR0, 8'(NIC_HDR_BYTES + ETH_HDR_BYTES)};
          3'd1: {op_off, op_wdata} = {REG_RSAR1, nextp};
          3'd2: {op_off, op_wdata} = {REG_RBCR0, plen[7:0]};
          3'd3: {op_off, op_wdata} = {REG_RBCR1, plen[15:8]};
          default: {op_off, op_wdata} = {REG_CR, CR_RD_READ};
        endcase
      end
      S_RX_FREE: begin
        op_req = 1'b1; op_off = REG_BNRY;
        op_wdata = (nxt == PSTART_PAGE) ? PSTOP_PAGE - 8'd1 : nxt - 8'd1;
      end
      S_TX_SET: begin
        op_req = 1'b1;
        unique case (idx[2:0])
          3'd0: {op_off, op_wdata} = {REG_RBCR0, 8'(frame_len)};
          3'd1: {op_off, op_wdata} = {REG_RBCR1, 8'(frame_len >> 8)};
          3'd2: {op_off, op_wdata} = {REG_RSAR0, 8'h00};
          3'd3: {op_off, op_wdata} = {REG_RSAR1, tx_page};
          default: {op_off, op_wdata} = {REG_CR, CR_RD_WRITE};
        endcase
      end
      S_TX_DAT: begin op_req = 1'b1; op_off = REG_DATA; op_wdata = fb_rdata; end
      S_TX_CMD: begin
        op_req = 1'b1;
        unique case (idx[1:0])
          2'd0: {op_off, op_wdata} = {REG_TPSR,  tx_page};
          2'd1: {op_off, op_wdata} = {REG_TBCR0, 8'(frame_len)};
          2'd2: {op_off, op_wdata} = {REG_TBCR1, 8'(frame_len >> 8)};
          default: {op_off, op_wdata} = {REG_CR, CR_TRANSMIT};
        endcase
      end
      S_TX_POLL: begin op_req = 1'b1; op_we = 1'b0; op_off = REG_CR; end
      S_TX_TSR:  begin op_req = 1'b1; op_we = 1'b0; op_off = REG_TSR; end
      default: ;
    endcase
  end

  isa_master #(.IO_BASE(IO_BASE), .SETUP(SETUP), .STROBE(STROBE), .HOLD(HOLD)) u_isa (
    .clk, .rst_n, .req(op_req && phase == PH_ISSUE && !isa_busy), .we(op_we),
    .off(op_off), .wdata(op_wdata), .rdata(isa_rdata), .done(isa_done),
    .busy(isa_busy), .sa, .sd_o, .sd_oe, .sd_i, .iorb, .iowb
  );

  assign frame_done = (state == S_TX_DONE);
  assign pl_start   = (state == S_RX_PSET) && (idx == '0) && (phase == PH_ISSUE) && !isa_busy;
  assign pl_valid   = (phase == PH_PUSH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= S_INIT;
      phase             <= PH_ISSUE;
      idx               <= '0;
      curr              <= '0;
      nextp             <= '0;
      plen              <= '0;
      attempts          <= '0;
      pl_data           <= '0;
      init_done         <= 1'b0;
      txd_buffer_select <= 1'b0;
      tx_ok             <= 1'b0;
      tx_retry          <= 1'b0;
      tx_fail           <= 1'b0;
      rx_frame          <= 1'b0;
      rx_error          <= 1'b0;
      rx_other          <= 1'b0;
      for (int i = 0; i < 18; i++) hdr[i] <= '0;
    end else begin
      tx_ok    <= 1'b0;
      tx_retry <= 1'b0;
      tx_fail  <= 1'b0;
      rx_frame <= 1'b0;
      rx_error <= 1'b0;
      rx_other <= 1'b0;
      unique case (phase)
        PH_ISSUE: begin
          if (op_req) begin
            if (!isa_busy) phase <= PH_WAIT;
          end else begin
            // decision states
            unique case (state)
              S_IDLE: begin
                idx <= '0;
                if (frame_valid) begin
                  attempts <= '0;
                  state    <= S_TX_SET;
                end else state <= S_RX_BNRY;
              end
              S_RX_CHK: begin
                idx <= '0;
                if (nextp == curr) state <= S_IDLE;      // no new package
                else state <= S_RX_HSET;
              end
              S_RX_DEC: begin
                idx <= '0;
                if (rsr != RSR_OK) begin
                  rx_error <= 1'b1;                      // receive error
                  state    <= S_RX_FREE;
                end else if (etype == ETH_TYPE_IP) begin
                  rx_frame <= 1'b1;
                  plen     <= (rcount > 16'(ETH_HDR_BYTES + ETH_CRC_BYTES))
                              ? rcount - 16'(ETH_HDR_BYTES + ETH_CRC_BYTES) : '0;
                  state    <= (rcount > 16'(ETH_HDR_BYTES + ETH_CRC_BYTES))
                              ? S_RX_PSET : S_RX_FREE;
                end else begin
                  rx_other <= 1'b1;                      // ARP or not for us
                  state    <= S_RX_FREE;
                end
              end
              S_TX_DONE: state <= S_IDLE;
              default:   state <= S_IDLE;
            endcase
          end
        end
        PH_WAIT: if (isa_done) begin
          phase <= PH_ISSUE;
          unique case (state)
            S_INIT: begin
              idx <= idx + 1'b1;
              if (idx == INIT_LAST) begin
                init_done <= 1'b1;
                state     <= S_IDLE;
              end
            end
            S_RX_BNRY: begin
              nextp <= (isa_rdata + 8'd1 == PSTOP_PAGE) ? PSTART_PAGE : isa_rdata + 8'd1;
              state <= S_RX_P1;
            end
            S_RX_P1:   state <= S_RX_CURR;
            S_RX_CURR: begin curr <= isa_rdata; state <= S_RX_P0; end
            S_RX_P0:   state <= S_RX_CHK;
            S_RX_HSET: begin
              idx <= idx + 1'b1;
              if (idx == 11'd4) begin idx <= '0; state <= S_RX_HRD; end
            end
            S_RX_HRD: begin
              hdr[idx[4:0]] <= isa_rdata;
              idx <= idx + 1'b1;
              if (idx == 11'(NIC_HDR_BYTES + ETH_HDR_BYTES - 1)) state <= S_RX_HEND;
            end
            S_RX_HEND: state <= S_RX_DEC;
            S_RX_PSET: begin
              idx <= idx + 1'b1;
              if (idx == 11'd4) begin idx <= '0; state <= S_RX_PRD; end
            end
            S_RX_PRD: begin
              pl_data <= isa_rdata;
              phase   <= PH_PUSH;
            end
            S_RX_PEND: state <= S_RX_FREE;
            S_RX_FREE: state <= S_IDLE;
            S_TX_SET: begin
              idx <= idx + 1'b1;
              if (idx == 11'd4) begin idx <= '0; state <= S_TX_DAT; end
            end
            S_TX_DAT: begin
              idx <= idx + 1'b1;
              if (idx + 1'b1 == 11'(frame_len)) begin idx <= '0; state <= S_TX_END; end
            end
            S_TX_END: state <= S_TX_CMD;
            S_TX_CMD: begin
              idx <= idx + 1'b1;
              if (idx == 11'd3) begin idx <= '0; state <= S_TX_POLL; end
            end
            S_TX_POLL: if (!cr_rd.txp) state <= S_TX_TSR;
            S_TX_TSR: begin
              if (isa_rdata == TSR_OK) begin             // send successfully
                tx_ok             <= 1'b1;
                txd_buffer_select <= !txd_buffer_select;
                state             <= S_TX_DONE;
              end else if (32'(attempts) >= SEND_RETRIES) begin
                tx_fail <= 1'b1;                         // give up
                state   <= S_TX_DONE;
              end else begin
                tx_retry <= 1'b1;                        // send failure, repeat
                attempts <= attempts + 1'b1;
                state    <= S_TX_SET;
              end
            end
            default: state <= S_IDLE;
          endcase
        end
        PH_PUSH: if (pl_ready) begin
          phase <= PH_ISSUE;
          idx   <= idx + 1'b1;
          if (16'(idx) + 16'd1 == plen) begin idx <= '0; state <= S_RX_PEND; end
        end
        default: phase <= PH_ISSUE;
      endcase
    end
  end
endmodule
