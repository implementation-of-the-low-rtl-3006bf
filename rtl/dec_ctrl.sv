// dec_ctrl: frame sequencer of the decoder: serial input, phase control of
// the iterative decoding, and serial output.
//
// Three frames are in flight at once: frame n+1 is loaded into the input
// LLR RAMs, frame n is decoded in the working RAMs, and frame n-1 is read out
// of the output decision RAMs. The phases of the decoding core are
//   INIT  (L+2 cycles)  copy the input LLRs into the working LLR RAMs and
//                       their signs into E1..E3; at the same time copy the
//                       decisions of the previous frame into the output RAMs;
//   CNP   (L+2 cycles)  check-node processing, then
//   VNP   (L+2 cycles)  variable-node processing, repeated MAX_ITER times.
// INIT starts when a complete frame has been loaded and the output RAMs are
// free for the previous frame's decisions; when both already hold it follows
// the last load cycle or the last VNP directly, so the first frame takes
// L*k*k + L+2 cycles from its first symbol to decoding and a steady stream
// one frame per (L+2)(2*MAX_ITER+1) cycles. As the input has no valid signal
// (the decoder takes din whenever it raises load), a frame's decisions leave
// during the next frame's decoding; the last real frame has to be followed
// by one more frame, e.g. of dummy symbols, to be pushed out. A fixed number
// of iterations is run (no early stop).
//
// Input: `load` is high when the decoder takes `din` at the next rising
// edge; symbols go to PE c at address a, in the order a = 0..L-1 (outer),
// c = 0..K*K-1 (inner), i.e. symbol s lands in PE s mod K*K at address
// s div K*K. Output: the decisions leave in the same order, one per cycle,
// on the cycles where dataout_ready is high (two cycles after the RAM read).
module dec_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned K        = K_DEF,
  parameter int unsigned L        = L_DEF,
  parameter int unsigned MAX_ITER = MAX_ITER_DEF,
  parameter int unsigned AW       = (L > 1) ? $clog2(L) : 1,
  parameter int unsigned CW       = $clog2(K * K),
  parameter int unsigned IW       = (MAX_ITER > 1) ? $clog2(MAX_ITER) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // decoding core
  output pe_ctrl_t      ctrl,
  output logic [AW-1:0] cycle,      // read-cycle index within a phase
  output logic [IW-1:0] iter,       // current iteration
  // serial input
  output logic          load,       // din is taken at the next edge
  output logic [CW-1:0] ld_pe,
  output logic [AW-1:0] ld_addr,
  // serial output
  output logic          out_re,
  output logic [CW-1:0] out_pe,
  output logic [AW-1:0] out_addr
);

  localparam int unsigned NPE = K * K;

  phase_e        phase;
  logic [AW:0]   cnt;          // 0 .. L+1 within a phase
  logic          xfer_out;
  logic          in_full;      // input RAMs hold a complete, unused frame
  logic          res_pending;  // working decisions not yet moved out
  logic          out_valid;    // output RAMs hold a frame being read out

  logic          phase_end;
  assign phase_end = (phase != PH_IDLE) && (cnt == (AW+1)'(L + 1));

  // A frame is ready for INIT once its last symbol is taken, so the INIT
  // can follow the last load cycle (or the last VNP) without a gap.
  // Likewise the output RAMs are free from the cycle of their last read on.
  logic          last_load, frame_ready, out_free;
  assign last_load   = load && (ld_pe == CW'(NPE - 1)) && (ld_addr == AW'(L - 1));
  assign frame_ready = in_full || last_load;
  assign out_free    = !out_valid ||
                       ((out_pe == CW'(NPE - 1)) && (out_addr == AW'(L - 1)));

  assign ctrl.phase    = phase;
  assign ctrl.start    = (phase != PH_IDLE) && (cnt == '0);
  assign ctrl.rd_en    = (phase != PH_IDLE) && (cnt < (AW+1)'(L));
  assign ctrl.xfer_out = xfer_out;
  assign cycle         = cnt[AW-1:0];

  // ---------------------------------------------------------- phases
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= PH_IDLE;
      cnt         <= '0;
      iter        <= '0;
      xfer_out    <= 1'b0;
      res_pending <= 1'b0;
    end else begin
      unique case (phase)
        PH_IDLE: begin
          cnt <= '0;
          if (frame_ready && (!res_pending || out_free)) begin
            phase    <= PH_INIT;
            xfer_out <= res_pending;
          end
        end
        PH_INIT: begin
          cnt <= cnt + 1'b1;
          if (phase_end) begin
            cnt         <= '0;
            iter        <= '0;
            res_pending <= 1'b0;
            phase       <= PH_CNP;
          end
        end
        PH_CNP: begin
          cnt <= cnt + 1'b1;
          if (phase_end) begin
            cnt   <= '0;
            phase <= PH_VNP;
          end
        end
        PH_VNP: begin
          cnt <= cnt + 1'b1;
          if (phase_end) begin
            cnt <= '0;
            if (iter == IW'(MAX_ITER - 1)) begin
              res_pending <= 1'b1;
              if (frame_ready && out_free) begin
                phase    <= PH_INIT;
                xfer_out <= 1'b1;
              end else begin
                phase    <= PH_IDLE;
              end
            end else begin
              iter  <= iter + 1'b1;
              phase <= PH_CNP;
            end
          end
        end
      endcase
    end
  end

  // ------------------------------------------------------- serial input
  // The input RAMs are busy while an INIT copies them out.
  assign load = !in_full && (phase != PH_INIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_full <= 1'b0;
      ld_pe   <= '0;
      ld_addr <= '0;
    end else begin
      if (phase == PH_INIT && phase_end) in_full <= 1'b0;
      if (load) begin
        if (ld_pe == CW'(NPE - 1)) begin
          ld_pe <= '0;
          if (ld_addr == AW'(L - 1)) begin
            ld_addr <= '0;
            in_full <= 1'b1;
          end else begin
            ld_addr <= ld_addr + 1'b1;
          end
        end else begin
          ld_pe <= ld_pe + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------ serial output
  assign out_re = out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pe    <= '0;
      out_addr  <= '0;
    end else begin
      if (phase == PH_INIT && phase_end && xfer_out) out_valid <= 1'b1;
      if (out_valid) begin
        if (out_pe == CW'(NPE - 1)) begin
          out_pe <= '0;
          if (out_addr == AW'(L - 1)) begin
            out_addr  <= '0;
            out_valid <= 1'b0;
          end else begin
            out_addr <= out_addr + 1'b1;
          end
        end else begin
          out_pe <= out_pe + 1'b1;
        end
      end
    end
  end

  // A new INIT may only overwrite the output RAMs once they are drained.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (phase == PH_INIT && xfer_out) |-> !out_valid);

endmodule
