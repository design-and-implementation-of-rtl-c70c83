// dma_controller: finite state machine of the DMA engine.
//
// It moves data words from a peripheral data port into the ECC-protected
// memory, one word per request in single mode or BURST_LEN consecutive words
// in burst mode, and then reads the written words back through the syndrome
// checker.
//
//   IDLE      waits for dma_req (a level, sampled every cycle); captures the
//             mode and the destination address.
//   ACK       dma_ack is high for this one cycle. The mode is checked
//             (01 single, 10 burst) and the transfer counter cleared. A
//             reserved mode (00, 11) or a burst that would run past the last
//             memory word writes nothing and goes straight to COMPLETE with
//             mode_err or addr_err.
//   WRITE     one word per granted cycle: periph_rd strobes the peripheral,
//             periph_data is written (encoded outside) to dst_addr + counter
//             and the counter increments; after the last word, COMPLETE.
//   COMPLETE  done is high for one cycle (with addr_err or mode_err when the
//             request was refused) and the read-back is triggered.
//   VERIFY    one written word per cycle is read back; chk_valid marks it and
//             chk_single / chk_double carry the syndrome checker's verdict.
//             Then back to IDLE.
//
// Timing: from the acknowledge cycle to the last memory write a single
// transfer takes 2 cycles and a 4-word burst 5 cycles; done follows in the
// next cycle. bus_req stays high from ACK to the end of VERIFY so the arbiter
// keeps the memory for the whole transfer; the FSM holds in WRITE or VERIFY
// while bus_gnt is low.
//
// The states, the mode codes, the burst counter with its limit of four and
// the final memory read follow the design description and its flow chart.
// Merging acknowledge, mode check and counter set-up into one cycle (so the
// stated 2- and 5-cycle latencies hold), the address-range check, the
// reading back of every written word and the handling of reserved modes are
// this implementation's choices.
module dma_controller
  import dma_pkg::*;
#(
  parameter int unsigned DATA_W    = dma_pkg::DEF_DATA_W,
  parameter int unsigned ADDR_W    = dma_pkg::DEF_ADDR_W,
  parameter int unsigned BURST_LEN = dma_pkg::DEF_BURST_LEN
) (
  input  logic              clk,
  input  logic              rst_n,
  // request side
  input  logic              dma_req,
  input  dma_mode_e         mode,
  input  logic [ADDR_W-1:0] dst_addr,
  output logic              dma_ack,
  output logic              busy,
  output logic              done,
  output logic              addr_err,
  output logic              mode_err,
  // peripheral data port
  output logic              periph_rd,
  input  logic [DATA_W-1:0] periph_data,
  // memory port, through the arbiter
  output logic              bus_req,
  input  logic              bus_gnt,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  // read-back check, from the syndrome checker
  input  logic              rd_single_err,
  input  logic              rd_double_err,
  output logic              chk_valid,
  output logic              chk_single,
  output logic              chk_double,
  output dma_state_e        state
);

  localparam int unsigned DEPTH = 1 << ADDR_W;
  localparam int unsigned CNT_W = $clog2(BURST_LEN + 1);

  dma_state_e        state_q, state_d;
  dma_mode_e         mode_q;
  logic [ADDR_W-1:0] base_q;
  logic [CNT_W-1:0]  cnt_q, cnt_d;   // words written / read back so far
  logic [CNT_W-1:0]  len_q, len_d;   // words in this transfer
  logic              aerr_q, aerr_d, merr_q, merr_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      mode_q  <= MODE_NONE;
      base_q  <= '0;
      cnt_q   <= '0;
      len_q   <= '0;
      aerr_q  <= 1'b0;
      merr_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
      len_q   <= len_d;
      aerr_q  <= aerr_d;
      merr_q  <= merr_d;
      if (state_q == S_IDLE && dma_req) begin
        mode_q <= mode;
        base_q <= dst_addr;
      end
    end
  end

  always_comb begin
    state_d   = state_q;
    cnt_d     = cnt_q;
    len_d     = len_q;
    aerr_d    = aerr_q;
    merr_d    = merr_q;
    dma_ack   = 1'b0;
    done      = 1'b0;
    addr_err  = 1'b0;
    mode_err  = 1'b0;
    periph_rd = 1'b0;
    bus_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = base_q + ADDR_W'(cnt_q);
    mem_wdata = periph_data;
    chk_valid = 1'b0;
    chk_single = 1'b0;
    chk_double = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        if (dma_req) state_d = S_ACK;
      end

      S_ACK: begin
        dma_ack = 1'b1;
        bus_req = 1'b1;
        cnt_d   = '0;
        aerr_d  = 1'b0;
        merr_d  = 1'b0;
        unique case (mode_q)
          MODE_SINGLE: len_d = CNT_W'(1);
          MODE_BURST:  len_d = CNT_W'(BURST_LEN);
          default:     len_d = '0;
        endcase
        if (len_d == '0) begin
          merr_d  = 1'b1;
          state_d = S_COMPLETE;
        end else if (32'(base_q) + 32'(len_d) > DEPTH) begin
          aerr_d  = 1'b1;
          state_d = S_COMPLETE;
        end else begin
          state_d = S_WRITE;
        end
      end

      S_WRITE: begin
        bus_req = 1'b1;
        if (bus_gnt) begin
          mem_we    = 1'b1;
          periph_rd = 1'b1;
          cnt_d     = cnt_q + 1'b1;
          if (cnt_d == len_q) state_d = S_COMPLETE;
        end
      end

      S_COMPLETE: begin
        bus_req  = 1'b1;
        done     = 1'b1;
        addr_err = aerr_q;
        mode_err = merr_q;
        cnt_d    = '0;
        state_d  = (aerr_q || merr_q) ? S_IDLE : S_VERIFY;
      end

      S_VERIFY: begin
        bus_req = 1'b1;
        if (bus_gnt) begin
          chk_valid  = 1'b1;
          chk_single = rd_single_err;
          chk_double = rd_double_err;
          cnt_d      = cnt_q + 1'b1;
          if (cnt_d == len_q) state_d = S_IDLE;
        end
      end

      default: state_d = S_IDLE;
    endcase
  end

  assign busy  = (state_q != S_IDLE);
  assign state = state_q;

  // Handshake rules: the acknowledge lasts one cycle, memory is written only
  // while the arbiter grants it.
  property p_ack_one_cycle;
    @(posedge clk) disable iff (!rst_n) dma_ack |=> !dma_ack;
  endproperty
  assert property (p_ack_one_cycle);

  property p_write_granted;
    @(posedge clk) disable iff (!rst_n) mem_we |-> bus_gnt;
  endproperty
  assert property (p_write_granted);

endmodule
