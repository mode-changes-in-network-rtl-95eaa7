`timescale 1ns / 1ps
// Network adapter extended for mode changes.
//
// Moves blocks of data from the local scratch pad memory (SPM) into the TDM
// network under a static schedule, and writes incoming packets into the SPM.
// It contains the mode change and timing logic (na_mode_change), the
// two-bank slot table (written only by the schedule extractor) and a DMA
// table with one entry per destination node. The route of a packet is a
// field of the slot table entry, not of the DMA entry.
//
// Sending, one slot = three cycles:
//   S1  the slot table is read at {rbank, slot counter};
//   S2  if the entry is valid and its DMA entry is active, the SPM is read at
//       the entry's read pointer;
//   S3  the packet {route, remote write address, data} is formed, the read
//       and write pointers increment, the word count decrements, and the
//       entry is deactivated when the count reaches 0.
// The packet is presented on tx_* from the cycle after S3, delayed by the
// slot's postpone field (0 to 2 cycles), for one cycle.
//
// Receiving: a packet on rx_* is held in a one-packet buffer and written to
// the SPM in the next cycle in which the SPM port is not used for sending.
// Packets arrive at most once per slot, so one buffer is enough.
//
// Processor interface (OCPio slave; byte address bits [2 +: DMA_IND_W+1]):
// word 2*i   of the DMA area: {remote write pointer[31:16], read pointer[15:0]}
// word 2*i+1 of the DMA area: write = word count (sets the entry active if it
//            is not 0), read = {active[31], word count[15:0]}.
// Reads answer in the cycle of the command; writes through a WRITE_DONE
// state until MRespAccept, like the mode change controller.
//
// Basis: slot counter, two-bank slot table holding the route, DMA table
// with read and write pointers and a word count, and the mode change port
// follow the thesis design. The OCPio address map, the per-phase timing of
// the send path, the postpone implementation, the receive buffer and the
// one-word packet are choices of this implementation; the real adapter sends
// three-flit packets to an asynchronous router.
module network_adapter
  import mc_pkg::*;
#(
  parameter int unsigned SPM_AW      = 16,
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  // OCPio slave from the local processor (DMA table)
  input  ocp_cmd_e              ocp_mcmd,
  input  logic [OCP_ADDR_W-1:0] ocp_maddr,
  input  logic [OCP_DATA_W-1:0] ocp_mdata,
  input  logic                  ocp_mrespaccept,
  output ocp_resp_e             ocp_sresp,
  output logic [OCP_DATA_W-1:0] ocp_sdata,
  output logic                  ocp_scmdaccept,
  // local SPM port (synchronous read, synchronous write)
  output logic [SPM_AW-1:0]     spm_addr,
  output logic                  spm_wen,
  output logic [31:0]           spm_wdata,
  input  logic [31:0]           spm_rdata,
  // packets to and from the switched structure
  output logic                  tx_valid,
  output logic [ROUTE_W-1:0]    tx_route,
  output logic [SPM_AW-1:0]     tx_waddr,
  output logic [31:0]           tx_data,
  input  logic                  rx_valid,
  input  logic [SPM_AW-1:0]     rx_waddr,
  input  logic [31:0]           rx_data,
  // mode change: swap command from the extractor
  input  logic                  swap_req,
  input  slot_cnt_t             swap_size,
  input  period_t               swap_moment,
  // mode change: slot table write port from the extractor
  input  logic                  st_wclk,
  input  logic                  st_wen,
  input  logic [SLOT_CNT_W:0]   st_waddr,
  input  mc_word_t              st_wdata,
  output logic                  wbank,
  // observation
  output tdm_phase_e            phase,
  output slot_cnt_t             slot_cnt,
  output period_t               period_cnt,
  output logic                  rbank,
  output logic                  swapped
);
  localparam int unsigned ENTRIES = 2**DMA_IND_W;

  typedef struct packed {
    logic              active;
    logic [CNT_W-1:0]  count;
    logic [SPM_AW-1:0] wptr;
    logic [SPM_AW-1:0] rptr;
  } dma_entry_t;

  typedef enum logic {IO_IDLE, IO_WRITE_DONE} io_state_e;

  dma_entry_t          dma_q [ENTRIES];
  io_state_e           io_q;
  logic                eop;
  logic                booted;
  slot_entry_t         entry;
  mc_word_t            st_rdata;
  logic                send_s2;
  logic                send_s3;
  logic [DMA_IND_W-1:0] idx_q;
  logic [ROUTE_W-1:0]  route_q;
  logic [POSTPONE_W-1:0] post_q;
  logic [POSTPONE_W-1:0] wait_q;
  logic                out_pend;
  logic                rxb_v;
  logic [SPM_AW-1:0]   rxb_addr;
  logic [31:0]         rxb_data;
  logic                io_wr;
  logic [DMA_IND_W-1:0] io_idx;
  logic                io_field;

  // ------------------------------------------------ mode change logic
  na_mode_change #(.SYNC_STAGES(SYNC_STAGES)) u_mc (
    .clk        (clk),
    .rst        (rst),
    .swap_req   (swap_req),
    .swap_size  (swap_size),
    .swap_moment(swap_moment),
    .phase      (phase),
    .slot_cnt   (slot_cnt),
    .period_cnt (period_cnt),
    .eop        (eop),
    .rbank      (rbank),
    .wbank      (wbank),
    .booted     (booted),
    .swapped    (swapped)
  );

  slot_table u_slot_table (
    .wclk (st_wclk),
    .wen  (st_wen),
    .waddr(st_waddr),
    .wdata(st_wdata),
    .clk  (clk),
    .raddr({rbank, slot_cnt}),
    .rdata(st_rdata)
  );

  assign entry   = slot_entry_t'(st_rdata);
  assign send_s2 = (phase == TDM_S2) && booted && entry.valid && dma_q[entry.dma_idx].active;

  // ------------------------------------------------ OCPio (DMA table)
  assign io_idx   = ocp_maddr[3 +: DMA_IND_W];
  assign io_field = ocp_maddr[2];
  assign io_wr    = (io_q == IO_IDLE) && (ocp_mcmd == OCP_CMD_WR);

  always_comb begin
    ocp_sresp      = OCP_RESP_NULL;
    ocp_sdata      = '0;
    ocp_scmdaccept = 1'b0;
    if (io_q == IO_IDLE) begin
      if (ocp_mcmd == OCP_CMD_RD) begin
        ocp_scmdaccept = 1'b1;
        ocp_sresp      = OCP_RESP_DVA;
        if (io_field) begin
          ocp_sdata[31]        = dma_q[io_idx].active;
          ocp_sdata[CNT_W-1:0] = dma_q[io_idx].count;
        end else begin
          ocp_sdata[16 +: SPM_AW] = dma_q[io_idx].wptr;
          ocp_sdata[0 +: SPM_AW]  = dma_q[io_idx].rptr;
        end
      end
    end else begin
      ocp_scmdaccept = 1'b1;
      ocp_sresp      = OCP_RESP_DVA;
    end
  end

  // ------------------------------------------------ send / DMA update
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      io_q     <= IO_IDLE;
      send_s3  <= 1'b0;
      idx_q    <= '0;
      route_q  <= '0;
      post_q   <= '0;
      wait_q   <= '0;
      out_pend <= 1'b0;
      tx_valid <= 1'b0;
      tx_route <= '0;
      tx_waddr <= '0;
      tx_data  <= '0;
      for (int i = 0; i < ENTRIES; i++) dma_q[i] <= '0;
    end else begin
      // OCPio handshake
      if (io_wr) io_q <= IO_WRITE_DONE;
      else if (io_q == IO_WRITE_DONE && ocp_mrespaccept) io_q <= IO_IDLE;

      // S2: remember what is sent in this slot
      send_s3 <= send_s2;
      if (send_s2) begin
        idx_q   <= entry.dma_idx;
        route_q <= entry.route;
        post_q  <= entry.postpone;
      end

      // S3: build the packet, update the DMA entry
      tx_valid <= 1'b0;
      if (send_s3) begin
        tx_route <= route_q;
        tx_waddr <= dma_q[idx_q].wptr;
        tx_data  <= spm_rdata;
        if (post_q == '0) begin
          tx_valid <= 1'b1;
        end else begin
          wait_q   <= post_q - 1'b1;
          out_pend <= 1'b1;
        end
        dma_q[idx_q].rptr  <= dma_q[idx_q].rptr + 1'b1;
        dma_q[idx_q].wptr  <= dma_q[idx_q].wptr + 1'b1;
        dma_q[idx_q].count <= dma_q[idx_q].count - 1'b1;
        if (dma_q[idx_q].count == CNT_W'(1)) dma_q[idx_q].active <= 1'b0;
      end else if (out_pend) begin
        if (wait_q == '0) begin
          tx_valid <= 1'b1;
          out_pend <= 1'b0;
        end else begin
          wait_q <= wait_q - 1'b1;
        end
      end

      // processor writes to the DMA table win over the update above
      if (io_wr) begin
        if (io_field) begin
          dma_q[io_idx].count  <= ocp_mdata[CNT_W-1:0];
          dma_q[io_idx].active <= (ocp_mdata[CNT_W-1:0] != '0);
        end else begin
          dma_q[io_idx].rptr <= ocp_mdata[0 +: SPM_AW];
          dma_q[io_idx].wptr <= ocp_mdata[16 +: SPM_AW];
        end
      end
    end
  end

  // ------------------------------------------------ receive
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rxb_v    <= 1'b0;
      rxb_addr <= '0;
      rxb_data <= '0;
    end else begin
      if (rx_valid) begin
        rxb_v    <= 1'b1;
        rxb_addr <= rx_waddr;
        rxb_data <= rx_data;
      end else if (spm_wen) begin
        rxb_v <= 1'b0;
      end
    end
  end

  // SPM port: the send read in S2 has priority over buffered writes
  assign spm_wen   = rxb_v && !send_s2;
  assign spm_addr  = send_s2 ? dma_q[entry.dma_idx].rptr : rxb_addr;
  assign spm_wdata = rxb_data;

  // a slot may be postponed by at most two cycles, or its packet would meet
  // the next slot's packet on tx_*
  a_postpone_range: assert property (
    @(posedge clk) disable iff (rst) send_s2 |-> (entry.postpone <= POSTPONE_W'(2)));

  initial assert (SPM_AW <= 16) else $error("SPM pointers must fit 16 bits");
endmodule
