// dma_engine: transaction-layer side of the PCIe endpoint.  It makes the
// FPGA a bus master for DMA and a target for programmed I/O.
//
// Receive side (host -> FPGA), one 64-bit beat per cycle, first DWORD of a
// packet in bits [63:32]:
//   * MWr32 of one DWORD to BAR0  -> register write (PIO write)
//   * MRd32 of one DWORD to BAR0  -> register read; a CplD is queued (one
//                                    outstanding PIO read, the stream stalls
//                                    while the previous one is unanswered)
//   * CplD                         -> payload of a DMA read.  The 3-DWORD
//                                    header leaves the payload one DWORD out
//                                    of step with the 64-bit beats, so a
//                                    one-DWORD holding register realigns it
//                                    into 64-bit words for the DMA READ FIFO.
// Transmit side, priority PIO completion > DMA write > DMA read request:
//   * DMA write (DIR_TO_HOST): MWr32 TLPs of 128 bytes (35 DWORDs, 18 beats),
//     each started only when the DMA WRITE FIFO holds 16 words, to
//     consecutive host addresses.
//   * DMA read (DIR_TO_FPGA): MRd32 requests of 128 bytes, issued while the
//     DMA READ FIFO has room for all data requested and not yet received
//     and at most 32 requests are outstanding (5-bit tags).
// A DMA moves dma_cmd.ntlp TLPs starting at dma_cmd.addr; dma_done pulses
// when the last TLP has been sent (writes) or its data received (reads).
//
// Timing: an MWr TLP occupies the link for 18 cycles, i.e. 16 words of data
// in 18 cycles at the full 64-bit rate when tx_ready stays high.
//
// From the design description: bus mastering with DMA in both directions,
// 128-byte TLPs, the number of TLPs set when the DMA is started, PIO access
// to the register file.  Own choices: 32-bit addressing only (3-DWORD
// headers; the DMA segment is assumed below 4 GB), completions assumed to
// arrive in request order, no poisoned/error handling, the beat format.
module dma_engine
  import pcie_rp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4096,
  localparam int unsigned LW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] completer_id,
  // receive stream from the endpoint
  input  tlp_beat_t   rx_beat,
  input  logic        rx_valid,
  output logic        rx_ready,
  // transmit stream to the endpoint
  output tlp_beat_t   tx_beat,
  output logic        tx_valid,
  input  logic        tx_ready,
  // DMA control
  input  dma_cmd_t    dma_cmd,
  output logic        dma_busy,
  output logic        dma_done,
  output logic [15:0] dma_tlps_done,
  // register file access
  output logic        reg_wr_en,
  output logic [7:0]  reg_wr_addr,
  output logic [31:0] reg_wr_data,
  output logic [7:0]  reg_rd_addr,
  input  logic [31:0] reg_rd_data,
  // DMA READ FIFO (write side)
  output logic        rdf_wr_en,
  output logic [63:0] rdf_wr_data,
  input  logic [LW-1:0] rdf_level,
  // DMA WRITE FIFO (read side)
  output logic        wrf_rd_en,
  input  logic [63:0] wrf_rd_data,
  input  logic [LW-1:0] wrf_level
);

  // ------------------------------------------------------------------
  // DMA state
  // ------------------------------------------------------------------
  dma_dir_e    dir_q;
  logic [31:0] addr_q;        // next TLP address
  logic [15:0] ntlp_q;
  logic [15:0] issued_q;      // TLPs (MWr) or requests (MRd) sent
  logic [31:0] rx_words_q;    // DMA read: words pushed into the READ FIFO
  logic [LW:0] inflight_q;    // DMA read: words requested, not yet pushed
  logic [4:0]  tag_q;

  // ------------------------------------------------------------------
  // Receive side
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {RX_HDR, RX_HDR2, RX_CPL, RX_SKIP} rx_state_e;
  rx_state_e   rx_st;
  logic [31:0] rx_dw0, rx_dw1;
  logic [9:0]  rx_dw_left;
  logic        hold_v;
  logic [31:0] hold_dw;

  logic        pio_pend;
  logic [15:0] pio_req_id;
  logic [7:0]  pio_tag;
  logic [7:0]  pio_addr;

  wire [7:0] rx_ft  = rx_dw0[31:24];
  wire [9:0] rx_len = rx_dw0[9:0];
  wire rdf_room = rdf_level < LW'(FIFO_DEPTH);

  always_comb begin
    unique case (rx_st)
      RX_HDR:  rx_ready = 1'b1;
      RX_HDR2: rx_ready = !(rx_ft == FT_MRD32 && pio_pend) && rdf_room;
      RX_CPL:  rx_ready = rdf_room;
      default: rx_ready = 1'b1;
    endcase
  end

  wire rx_fire = rx_valid && rx_ready;

  // Payload DWORDs presented by this beat to the realigner.
  logic        pl_n1, pl_n2;   // one / two payload DWORDs
  logic [31:0] pl_a, pl_b;
  always_comb begin
    pl_n1 = 1'b0;
    pl_n2 = 1'b0;
    pl_a  = rx_beat.data[63:32];
    pl_b  = rx_beat.data[31:0];
    if (rx_fire && rx_st == RX_HDR2 && rx_ft == FT_CPLD && rx_len != 0) begin
      pl_n1 = 1'b1;
      pl_a  = rx_beat.data[31:0];
    end else if (rx_fire && rx_st == RX_CPL) begin
      if (rx_dw_left >= 2) pl_n2 = 1'b1;
      else                 pl_n1 = 1'b1;
    end
  end

  always_comb begin
    rdf_wr_en   = 1'b0;
    rdf_wr_data = {pl_a, pl_b};
    if (pl_n1 && hold_v) begin
      rdf_wr_en   = 1'b1;
      rdf_wr_data = {hold_dw, pl_a};
    end else if (pl_n2) begin
      rdf_wr_en   = 1'b1;
      rdf_wr_data = hold_v ? {hold_dw, pl_a} : {pl_a, pl_b};
    end
  end

  always_comb begin
    reg_wr_en   = rx_fire && rx_st == RX_HDR2 && rx_ft == FT_MWR32 && rx_len == 10'd1;
    reg_wr_addr = rx_beat.data[39:32];
    reg_wr_data = rx_beat.data[31:0];
    reg_rd_addr = pio_addr;
  end

  logic pio_cpl_sent;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_st      <= RX_HDR;
      rx_dw0     <= '0;
      rx_dw1     <= '0;
      rx_dw_left <= '0;
      hold_v     <= 1'b0;
      hold_dw    <= '0;
      pio_pend   <= 1'b0;
      pio_req_id <= '0;
      pio_tag    <= '0;
      pio_addr   <= '0;
    end else begin
      if (pio_cpl_sent) pio_pend <= 1'b0;
      // realigner holding register
      if (pl_n1) begin
        hold_v  <= !hold_v;
        hold_dw <= pl_a;
      end else if (pl_n2 && hold_v) begin
        hold_dw <= pl_b;
      end
      if (rx_fire) begin
        unique case (rx_st)
          RX_HDR: if (rx_beat.sof) begin
            rx_dw0 <= rx_beat.data[63:32];
            rx_dw1 <= rx_beat.data[31:0];
            rx_st  <= rx_beat.eof ? RX_HDR : RX_HDR2;
          end
          RX_HDR2: begin
            if (rx_ft == FT_MRD32 && rx_len == 10'd1) begin
              pio_pend   <= 1'b1;
              pio_req_id <= rx_dw1[31:16];
              pio_tag    <= rx_dw1[15:8];
              pio_addr   <= rx_beat.data[39:32];
            end
            if (rx_beat.eof)                            rx_st <= RX_HDR;
            else if (rx_ft == FT_CPLD && rx_len > 10'd1) begin
              rx_st      <= RX_CPL;
              rx_dw_left <= rx_len - 10'd1;
            end else                                    rx_st <= RX_SKIP;
          end
          RX_CPL: begin
            rx_dw_left <= (rx_dw_left >= 2) ? rx_dw_left - 10'd2 : '0;
            if (rx_beat.eof) rx_st <= RX_HDR;
          end
          RX_SKIP: if (rx_beat.eof) rx_st <= RX_HDR;
        endcase
      end
    end
  end

  // ------------------------------------------------------------------
  // Transmit side
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {TX_IDLE, TX_CPL, TX_MRD, TX_MWR_H, TX_MWR_D} tx_state_e;
  tx_state_e   tx_st;
  logic [4:0]  tx_cnt;       // beat counter inside an MWr
  logic [31:0] tx_save;      // low DWORD of the previous FIFO word
  logic [31:0] cpl_data_q;   // register value captured for the completion
  logic [31:0] tlp_addr_q;   // address of the TLP being sent

  localparam int unsigned MAX_INFLIGHT = 32 * TLP_WORDS;

  // Counts as they will be after this cycle, so that a new TLP can follow
  // the last beat of the previous one without an idle cycle.
  logic        mrd_sent, mwr_sent;
  wire [15:0]  issued_nx   = issued_q + ((mrd_sent || mwr_sent) ? 16'd1 : 16'd0);
  wire [LW:0]  inflight_nx = inflight_q + (mrd_sent ? (LW+1)'(TLP_WORDS) : '0)
                             - (rdf_wr_en ? (LW+1)'(1) : '0);

  wire want_mwr = dma_busy && dir_q == DIR_TO_HOST && issued_nx < ntlp_q
                  && wrf_level >= LW'(TLP_WORDS);
  wire want_mrd = dma_busy && dir_q == DIR_TO_FPGA && issued_nx < ntlp_q
                  && (inflight_nx + (LW+1)'(TLP_WORDS)) <= (LW+1)'(FIFO_DEPTH) - (LW+1)'(rdf_level)
                  && 32'(inflight_nx) + TLP_WORDS <= MAX_INFLIGHT;
  wire [31:0] addr_nx = (mrd_sent || mwr_sent) ? addr_q + TLP_BYTES : addr_q;

  wire [31:0] hdr_mwr0 = {FT_MWR32, 8'h00, 6'h00, 10'(TLP_DWORDS)};
  wire [31:0] hdr_mrd0 = {FT_MRD32, 8'h00, 6'h00, 10'(TLP_DWORDS)};
  wire [31:0] hdr_cpl0 = {FT_CPLD,  8'h00, 6'h00, 10'd1};

  always_comb begin
    tx_valid  = 1'b0;
    tx_beat   = '0;
    wrf_rd_en = 1'b0;
    unique case (tx_st)
      TX_IDLE: ;
      TX_CPL: begin
        tx_valid = 1'b1;
        if (tx_cnt == 0) begin
          tx_beat.sof  = 1'b1;
          tx_beat.data = {hdr_cpl0, completer_id, 3'b000, 1'b0, 12'd4};
        end else begin
          tx_beat.eof  = 1'b1;
          tx_beat.data = {pio_req_id, pio_tag, 1'b0, pio_addr[6:0], cpl_data_q};
        end
      end
      TX_MRD: begin
        tx_valid = 1'b1;
        if (tx_cnt == 0) begin
          tx_beat.sof  = 1'b1;
          tx_beat.data = {hdr_mrd0, completer_id, 3'b000, tag_q, 8'hFF};
        end else begin
          tx_beat.eof  = 1'b1;
          tx_beat.half = 1'b1;
          tx_beat.data = {tlp_addr_q, 32'h0};
        end
      end
      TX_MWR_H: begin
        tx_valid     = 1'b1;
        tx_beat.sof  = 1'b1;
        tx_beat.data = {hdr_mwr0, completer_id, 8'h00, 8'hFF};
      end
      TX_MWR_D: begin
        tx_valid = 1'b1;
        if (tx_cnt == 1) begin
          tx_beat.data = {tlp_addr_q, wrf_rd_data[63:32]};
          wrf_rd_en    = tx_ready;
        end else if (tx_cnt == 5'(TLP_WORDS + 1)) begin
          tx_beat.data = {tx_save, 32'h0};
          tx_beat.eof  = 1'b1;
          tx_beat.half = 1'b1;
        end else begin
          tx_beat.data = {tx_save, wrf_rd_data[63:32]};
          wrf_rd_en    = tx_ready;
        end
      end
      default: ;
    endcase
  end

  wire tx_fire = tx_valid && tx_ready;
  wire tx_last = tx_fire && tx_beat.eof;
  assign pio_cpl_sent = tx_last && tx_st == TX_CPL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_st      <= TX_IDLE;
      tx_cnt     <= '0;
      tx_save    <= '0;
      cpl_data_q <= '0;
      tlp_addr_q <= '0;
    end else begin
      unique case (tx_st)
        TX_IDLE: begin
          tx_cnt <= '0;
          if (pio_pend) begin
            tx_st      <= TX_CPL;
            cpl_data_q <= reg_rd_data;
          end else if (want_mwr) begin
            tx_st      <= TX_MWR_H;
            tlp_addr_q <= addr_nx;
          end else if (want_mrd) begin
            tx_st      <= TX_MRD;
            tlp_addr_q <= addr_nx;
          end
        end
        TX_MWR_H: if (tx_fire) begin
          tx_st  <= TX_MWR_D;
          tx_cnt <= 5'd1;
        end
        default: if (tx_fire) begin
          tx_cnt <= tx_cnt + 1'b1;
          if (wrf_rd_en) tx_save <= wrf_rd_data[31:0];
          if (tx_beat.eof) begin
            // back-to-back DMA TLPs; a pending PIO completion goes via idle
            tx_cnt <= '0;
            if (!pio_pend && !pio_cpl_sent && want_mwr) begin
              tx_st      <= TX_MWR_H;
              tlp_addr_q <= addr_nx;
            end else if (!pio_pend && !pio_cpl_sent && want_mrd) begin
              tx_st      <= TX_MRD;
              tlp_addr_q <= addr_nx;
            end else begin
              tx_st <= TX_IDLE;
            end
          end
        end
      endcase
    end
  end

  // ------------------------------------------------------------------
  // DMA bookkeeping
  // ------------------------------------------------------------------
  assign mrd_sent = tx_last && tx_st == TX_MRD;
  assign mwr_sent = tx_last && tx_st == TX_MWR_D;
  wire [31:0] want_words = 32'(ntlp_q) * TLP_WORDS;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dma_busy      <= 1'b0;
      dma_done      <= 1'b0;
      dma_tlps_done <= '0;
      dir_q         <= DIR_TO_FPGA;
      addr_q        <= '0;
      ntlp_q        <= '0;
      issued_q      <= '0;
      rx_words_q    <= '0;
      inflight_q    <= '0;
      tag_q         <= '0;
    end else begin
      dma_done <= 1'b0;
      if (!dma_busy) begin
        if (dma_cmd.start && dma_cmd.ntlp != 0) begin
          dma_busy      <= 1'b1;
          dir_q         <= dma_cmd.dir;
          addr_q        <= dma_cmd.addr;
          ntlp_q        <= dma_cmd.ntlp;
          issued_q      <= '0;
          rx_words_q    <= '0;
          inflight_q    <= '0;
          dma_tlps_done <= '0;
        end
      end else begin
        if (mrd_sent || mwr_sent) begin
          issued_q <= issued_q + 1'b1;
          addr_q   <= addr_q + TLP_BYTES;
        end
        if (mrd_sent) tag_q <= tag_q + 1'b1;
        inflight_q <= inflight_nx;
        if (rdf_wr_en) rx_words_q <= rx_words_q + 1'b1;
        if (dir_q == DIR_TO_HOST) begin
          if (mwr_sent) begin
            dma_tlps_done <= dma_tlps_done + 1'b1;
            if (issued_q + 1'b1 == ntlp_q) begin
              dma_busy <= 1'b0;
              dma_done <= 1'b1;
            end
          end
        end else begin
          dma_tlps_done <= 16'((rx_words_q + (rdf_wr_en ? 1 : 0)) / TLP_WORDS);
          if (rdf_wr_en && rx_words_q + 1 == want_words) begin
            dma_busy <= 1'b0;
            dma_done <= 1'b1;
          end
        end
      end
    end
  end

  a_tx_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                tx_valid && !tx_ready |=> tx_valid && $stable(tx_beat));
  a_rdf_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                      rdf_wr_en |-> rdf_room);

endmodule
