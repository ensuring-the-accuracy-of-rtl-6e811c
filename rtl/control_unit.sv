// control_unit: runs a sequence of layers on the accelerator.
//
// A layer here maps an input activation matrix X (P rows of 16 activations,
// one 32-byte block per row) through a 16 x 16 weight tile W to an output
// matrix Y = X * W of the same shape, i.e. a pointwise layer of 16 input and
// 16 output channels over P = 16 * num_tiles positions. For every layer the
// unit (1) reads the layer's 16 weight blocks (weight memory blocks
// 16*layer .. 16*layer+15) into the dispatcher, then for every tile (2) reads
// the next 16 input blocks from the source activation memory, in address
// order, into the dispatcher, (3) starts the PE array and waits for it, and
// (4) lets the output buffer write the 16 result blocks, in address order, to
// the destination memory. After the last tile, and once the destination memory
// reports it is idle (wr_ready), the two activation memories swap their
// input/output roles (src_sel toggles) and the next layer starts.
// src_sel names the memory that is the input of the current layer. It is 1
// after reset, so memory 0 is the output buffer that the input image is
// written into, and toggles when start is accepted and after every layer, so
// when done pulses the memory holding the last result is the input buffer and
// can be read out. Every activation block is read exactly once and in the
// order it was written, which the safe bank's FIFO order relies on.
// Swapping the roles after every layer and sequential access follow the
// paper; the paper says only that the control unit uses the current layer's
// control information to feed the array, so the layer shape, the tiling and
// this sequence are this design's own.
module control_unit
  import sas_pkg::*;
#(
  parameter int unsigned BAW = 16,      // activation block address width
  parameter int unsigned WAW = 16       // weight block address width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [7:0]     num_layers,
  input  logic [BAW-5:0] num_tiles,
  output logic           busy,
  output logic           done,
  output logic           src_sel,
  // weight memory read port
  output logic           w_req,
  output logic [WAW-1:0] w_addr,
  input  logic           w_rvalid,
  // source activation memory
  output logic           rd_valid,
  input  logic           rd_ready,
  output logic [BAW-1:0] rd_addr,
  input  logic           rd_out_valid,
  output logic           rd_out_ready,
  // destination activation memory
  output logic           wr_valid,
  input  logic           wr_ready,
  output logic [BAW-1:0] wr_addr,
  // dispatcher
  output logic           a_we,
  output logic [3:0]     a_row,
  output logic           w_we,
  output logic [3:0]     w_row,
  output logic           pe_start,
  input  logic           pe_done,
  // output buffer
  output logic           ob_capture,
  input  logic           ob_valid,
  output logic           ob_ready,
  input  logic           ob_busy
);

  typedef enum logic [2:0] {S_IDLE, S_WREQ, S_WWAIT, S_AREQ, S_AWAIT, S_RUN, S_WRITE, S_DRAIN} state_e;
  state_e state;

  logic [7:0]     layer;
  logic [BAW-5:0] tile;
  logic [4:0]     wreq_cnt, wret_cnt;
  logic [3:0]     row;
  logic [3:0]     wrow;
  logic           pe_run_q;   // the array has been started for this tile

  assign busy     = (state != S_IDLE);
  assign w_req    = (state == S_WREQ);
  assign w_addr   = WAW'({layer, wreq_cnt[3:0]});
  assign w_we     = (state == S_WWAIT || state == S_WREQ) && w_rvalid;
  assign w_row    = wret_cnt[3:0];
  assign rd_valid = (state == S_AREQ);
  assign rd_addr  = {tile, row};
  assign rd_out_ready = (state == S_AWAIT);
  assign a_we     = (state == S_AWAIT) && rd_out_valid;
  assign a_row    = row;
  assign pe_start = (state == S_RUN) && !ob_busy && !pe_run_q;
  assign ob_capture = (state == S_RUN) && pe_done;
  assign wr_valid = (state == S_WRITE) && ob_valid;
  assign ob_ready = (state == S_WRITE) && wr_ready;
  assign wr_addr  = {tile, wrow};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      src_sel  <= 1'b1;
      layer    <= '0;
      tile     <= '0;
      wreq_cnt <= '0;
      wret_cnt <= '0;
      row      <= '0;
      wrow     <= '0;
      pe_run_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (w_we) wret_cnt <= wret_cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start && num_layers != '0 && num_tiles != '0) begin
          src_sel  <= ~src_sel;
          layer    <= '0;
          tile     <= '0;
          wreq_cnt <= '0;
          wret_cnt <= '0;
          state    <= S_WREQ;
        end
        S_WREQ: begin                           // 16 weight reads, one per cycle
          wreq_cnt <= wreq_cnt + 1'b1;
          if (wreq_cnt == 5'd15) state <= S_WWAIT;
        end
        S_WWAIT: if (wret_cnt == 5'd16) begin
          row   <= '0;
          state <= S_AREQ;
        end
        S_AREQ: if (rd_ready) state <= S_AWAIT;
        S_AWAIT: if (rd_out_valid) begin
          row <= row + 1'b1;
          if (row == 4'd15) begin
            pe_run_q <= 1'b0;
            state    <= S_RUN;
          end else begin
            state <= S_AREQ;
          end
        end
        S_RUN: begin
          if (pe_start) pe_run_q <= 1'b1;
          if (pe_done) begin
            wrow  <= '0;
            state <= S_WRITE;
          end
        end
        S_WRITE: if (ob_valid && wr_ready) begin
          wrow <= wrow + 1'b1;
          if (wrow == 4'd15) begin
            if (tile == num_tiles - 1'b1) begin
              state <= S_DRAIN;
            end else begin
              tile  <= tile + 1'b1;
              row   <= '0;
              state <= S_AREQ;
            end
          end
        end
        // The destination memory may still be storing M&L activations of the
        // last block in its safe bank; wr_ready says it has finished. Only
        // then may the roles swap, since the swap restarts the Safe Pointer.
        S_DRAIN: if (wr_ready) begin
          tile    <= '0;
          src_sel <= ~src_sel;                  // roles swap after every layer
          if (layer == num_layers - 1'b1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            layer    <= layer + 1'b1;
            wreq_cnt <= '0;
            wret_cnt <= '0;
            state    <= S_WREQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
