`timescale 1ns / 1ps
// Mode change controller.
//
// Fetches a new global schedule from the mode change scratch pad memory
// (SPM), pushes it word by word into the broadcast tree, and commands all
// network adapters to switch to it at a common future period boundary. It
// runs in the mesochronous TDM clock domain with its own copy of the slot
// and period counters (tdm_counter).
//
// Processor interface (OCPio slave, one address MC_ADDR): a read returns the
// status in SData[0] (1 = busy) in the same cycle; a write starts a mode
// change, with the schedule's SPM location in MData[16 +: SPM_AW] and its
// size minus one in MData[SLOT_CNT_W-1:0]. Writes go through a WRITE_DONE
// state that holds SCmdAccept and the response until MRespAccept. A command
// to another address is answered with ERR. A write while busy is acknowledged
// but ignored.
//
// Main machine: IDLE -> INIT (node ID = 0) -> PUSH_LEAD_IN (push the size
// word of the current node's view, start the SPM read) -> PUSH (push one
// schedule word per cycle; the SPM reads synchronously, so the word on the
// bus is the one addressed in the previous cycle) -> back to PUSH_LEAD_IN
// for the next node, or, after the last word of the last node, toggle the
// 2-phase swap command with moment = period counter rotated one place towards
// its LSB (PERIOD_CNT_SIZE-1 periods ahead) and go to WAIT_SWAP. In WAIT_SWAP
// the machine waits for the last cycle of that period, loads the new size
// into its slot counter and returns to IDLE (status free). Every word pushed
// is one toggle of tree_req; a schedule of G slots for N nodes takes
// N * (G + 1) cycles. The tree is assumed faster than the clock, so its
// acknowledge is not waited for (tree_ack is unused).
//
// Basis: the three machines (OCPio, timing, main), blind pushing, the
// size-then-words token order, the two-period swap distance and the swap in
// the last cycle of the moment period follow the thesis design. The encoding
// of location and size in the write word, the ERR answer to other addresses,
// ignoring a write while busy and the reset values are choices of this
// implementation.
module mc_controller
  import mc_pkg::*;
#(
  parameter int unsigned NODES   = 4,
  parameter int unsigned ID_W    = (NODES > 1) ? $clog2(NODES) : 1,
  parameter int unsigned SPM_AW  = $clog2(2 * MAX_SCHEDULE_SIZE * NODES),
  parameter logic [OCP_ADDR_W-1:0] MC_ADDR = '0
) (
  input  logic                  clk,
  input  logic                  rst,
  // OCPio slave port from the system processor
  input  ocp_cmd_e              ocp_mcmd,
  input  logic [OCP_ADDR_W-1:0] ocp_maddr,
  input  logic [OCP_DATA_W-1:0] ocp_mdata,
  input  logic                  ocp_mrespaccept,
  output ocp_resp_e             ocp_sresp,
  output logic [OCP_DATA_W-1:0] ocp_sdata,
  output logic                  ocp_scmdaccept,
  // synchronous read port of the mode change SPM
  output logic [SPM_AW-1:0]     spm_addr,
  input  mc_word_t              spm_rdata,
  // data channel into the broadcast tree
  output logic                  tree_req,
  output logic [ID_W-1:0]       tree_id,
  output mc_word_t              tree_data,
  input  logic                  tree_ack,
  // swap command channel to the network adapters
  output logic                  swap_req,
  output period_t               swap_moment,
  // observation
  output logic                  busy,
  output tdm_phase_e            phase,
  output slot_cnt_t             slot_cnt,
  output period_t               period_cnt
);
  typedef enum logic {IO_IDLE, IO_WRITE_DONE} io_state_e;
  typedef enum logic [2:0] {
    MC_IDLE, MC_INIT, MC_PUSH_LEAD_IN, MC_PUSH, MC_WAIT_SWAP
  } mc_state_e;

  io_state_e         io_q, io_d;
  mc_state_e         st_q, st_d;
  logic              start;
  logic              valid_addr;
  logic [SPM_AW-1:0] location_q, location_d;
  logic [ID_W-1:0]   node_q, node_d;
  slot_cnt_t         index_q, index_d;
  slot_cnt_t         new_max_q;
  period_t           moment_q;
  logic              push_en;
  logic              assert_swap;
  logic              swap_done;
  slot_cnt_t         max_slot;
  logic              eop;

  // ---------------------------------------------------- TDM counters
  tdm_counter u_tdm (
    .clk       (clk),
    .rst       (rst),
    .set_max   (swap_done),
    .new_max   (new_max_q),
    .phase     (phase),
    .slot_cnt  (slot_cnt),
    .max_slot  (max_slot),
    .period_cnt(period_cnt),
    .eop       (eop)
  );

  // ---------------------------------------------------- OCPio machine
  assign valid_addr = (ocp_maddr == MC_ADDR);

  always_comb begin
    io_d           = io_q;
    ocp_sresp      = OCP_RESP_NULL;
    ocp_sdata      = '0;
    ocp_scmdaccept = 1'b0;
    start          = 1'b0;
    unique case (io_q)
      IO_IDLE: begin
        if (ocp_mcmd == OCP_CMD_WR) begin
          start = valid_addr && (st_q == MC_IDLE);
          io_d  = IO_WRITE_DONE;
        end else if (ocp_mcmd == OCP_CMD_RD) begin
          ocp_scmdaccept = 1'b1;
          ocp_sdata[0]   = busy;
          ocp_sresp      = valid_addr ? OCP_RESP_DVA : OCP_RESP_ERR;
        end
      end
      default: begin
        ocp_scmdaccept = 1'b1;
        ocp_sresp      = valid_addr ? OCP_RESP_DVA : OCP_RESP_ERR;
        if (ocp_mrespaccept) io_d = IO_IDLE;
      end
    endcase
  end

  // ---------------------------------------------------- main machine
  always_comb begin
    st_d        = st_q;
    location_d  = location_q;
    node_d      = node_q;
    index_d     = index_q;
    push_en     = 1'b0;
    assert_swap = 1'b0;
    swap_done   = 1'b0;
    tree_data   = spm_rdata;
    unique case (st_q)
      MC_IDLE: begin
        if (start) begin
          location_d = ocp_mdata[16 +: SPM_AW];
          st_d       = MC_INIT;
        end
      end
      MC_INIT: begin
        node_d  = '0;
        push_en = 1'b1;
        st_d    = MC_PUSH_LEAD_IN;
      end
      MC_PUSH_LEAD_IN: begin
        tree_data                  = '0;
        tree_data[SLOT_CNT_W-1:0]  = new_max_q;
        index_d                    = '0;
        location_d                 = location_q + 1'b1;
        push_en                    = 1'b1;
        st_d                       = MC_PUSH;
      end
      MC_PUSH: begin
        if (index_q == new_max_q) begin
          if (node_q == ID_W'(NODES - 1)) begin
            assert_swap = 1'b1;
            st_d        = MC_WAIT_SWAP;
          end else begin
            push_en = 1'b1;
            node_d  = node_q + 1'b1;
            st_d    = MC_PUSH_LEAD_IN;
          end
        end else begin
          push_en    = 1'b1;
          location_d = location_q + 1'b1;
          index_d    = index_q + 1'b1;
        end
      end
      default: begin // MC_WAIT_SWAP
        if (eop && (period_cnt == moment_q)) begin
          swap_done = 1'b1;
          st_d      = MC_IDLE;
        end
      end
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      io_q       <= IO_IDLE;
      st_q       <= MC_IDLE;
      location_q <= '0;
      node_q     <= '0;
      index_q    <= '0;
      new_max_q  <= '0;
      moment_q   <= '0;
      tree_req   <= 1'b0;
      swap_req   <= 1'b0;
    end else begin
      io_q       <= io_d;
      st_q       <= st_d;
      location_q <= location_d;
      node_q     <= node_d;
      index_q    <= index_d;
      if (start) new_max_q <= ocp_mdata[SLOT_CNT_W-1:0];
      if (push_en) tree_req <= ~tree_req;
      if (assert_swap) begin
        moment_q <= {period_cnt[0], period_cnt[PERIOD_CNT_SIZE-1:1]};
        swap_req <= ~swap_req;
      end
    end
  end

  assign busy        = (st_q != MC_IDLE);
  assign spm_addr    = location_q;
  assign tree_id     = node_q;
  assign swap_moment = moment_q;

  // The pushed words must never overtake the tree: one token per cycle.
  property p_one_token_per_cycle;
    @(posedge clk) disable iff (rst) (st_q == MC_IDLE) |=> (tree_req == $past(tree_req));
  endproperty
  a_idle_quiet: assert property (p_one_token_per_cycle);

  initial assert (NODES >= 2)
    else $error("unsupported number of nodes");
endmodule
