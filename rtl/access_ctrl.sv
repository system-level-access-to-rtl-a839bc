// access_ctrl: command translator that operates an IEEE 1687 network from a
// byte stream arriving at a functional port.
//
// Protocol (see ijtag_pkg): control commands select instruments and set their
// operation in the SIB control register (SCR) and instrument control register
// (ICR); the first control command after a data command clears both. A data
// command starts the access. It runs a configuration scan, which shifts SCR
// into the closed chain of N SIBs and opens the selected segments, and then a
// data scan over the active path. The data scan walks the path from SIB N
// down to SIB 1: one SIB bit, then, if the SIB is open, the instrument's bits
// (length from the instrument length memory, ILM), least significant first.
// Write instruments get payload bits from the data command; read instruments
// get their own outgoing bits back as filler, so a read does not disturb
// them; SIB bits are shifted as 0 so the network is closed again after the
// access. Only the bits of read instruments are packed into returned bytes,
// every instrument starting a new byte, zero-padded.
//
// EXT = 1 adds the features of the level-i controller, whose network is
// bridge_net (iA..iD):
//   - the payload of a data command is streamed into iA, one byte per data
//     scan with iA's data-available bit generated as 1, waiting before each
//     scan while iA still holds an unsent byte (stream_busy);
//   - reading iB also writes 1 into iD in the same scan (acknowledge);
//   - with HW_IRQ = 1, when idle and with no command being assembled, a high
//     irq (iC) makes the controller read iB by itself and return the byte.
// The command format, SCR/ICR/ILM and the scan order follow the documented
// translator; the closing of the SIBs, the read filler, the byte packing and
// the per-byte streaming into iA are this design's choices.
//
// Timing: one scan bit per clock; a scan costs path length + 2 clocks. The
// shift stalls while a payload byte has not arrived or while the output byte
// register is still full. Byte streams use valid/ready handshakes.
module access_ctrl
  import ijtag_pkg::*;
#(
  parameter int N        = 150,
  parameter bit EXT      = 1'b0,
  parameter bit HW_IRQ   = 1'b0,
  parameter int ILM_KIND = EXT ? 1 : 0
) (
  input  logic       clk,
  input  logic       rst_n,
  // command byte stream in
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic       rx_ready,
  // returned bytes out
  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready,
  // scan network
  output logic       net_capture,
  output logic       net_shift,
  output logic       net_update,
  output logic       net_tdi,
  input  logic       net_tdo,
  // level-i extensions
  input  logic       irq,
  input  logic       stream_busy,
  output logic       busy
);
  ctrl_state_e   state;
  logic [N:1]    scr, icr;
  logic [7:0]    hdr0;
  logic [CW-1:0] remaining;
  logic          fresh;
  logic [IW-1:0] cur;
  logic          in_sib;
  logic [LW-1:0] bitpos, cur_len;
  logic [7:0]    wbyte, obyte;
  logic [3:0]    wcnt, obits;
  logic          consumed;
  logic [7:0]    out_data;
  logic          out_valid;

  ilm_rom #(.N(N), .KIND(ILM_KIND)) u_ilm (.idx(cur), .len(cur_len));

  assign tx_data = out_data;
  assign tx_valid = out_valid;
  assign busy = (state != S_IDLE);

  // ---- data-scan step, combinational ----
  logic sel, wr, last_bit, gen1, need_byte, push, out_free, step_ok, wbit;
  logic [7:0] push_byte;

  always_comb begin
    sel       = scr[cur];
    wr        = icr[cur];
    last_bit  = (bitpos == cur_len - LW'(1));
    gen1      = EXT && ((cur == IW'(BR_ID)) || (cur == IW'(BR_IA) && bitpos == LW'(8)));
    need_byte = !in_sib && wr && !gen1 && (wcnt == 0) && (remaining != 0);
    push      = !in_sib && !wr && (obits == 4'd7 || last_bit);
    out_free  = !out_valid || tx_ready;
    step_ok   = (!need_byte || rx_valid) && (!push || out_free);
    if (in_sib)         wbit = 1'b0;
    else if (!wr)       wbit = net_tdo;
    else if (gen1)      wbit = 1'b1;
    else if (wcnt != 0) wbit = wbyte[0];
    else if (need_byte) wbit = rx_data[0];
    else                wbit = 1'b0;
    push_byte = obyte | (8'(net_tdo) << obits);
  end

  // ---- outputs to the network and the byte streams ----
  always_comb begin
    net_capture = (state == S_CFG_CAP) || (state == S_DAT_CAP);
    net_update  = (state == S_CFG_UPD) || (state == S_DAT_UPD);
    net_shift   = (state == S_CFG_SH) || (state == S_DAT_SH && step_ok);
    net_tdi     = 1'b0;
    if (state == S_CFG_SH)      net_tdi = scr[cur];
    else if (state == S_DAT_SH) net_tdi = wbit;
    unique case (state)
      S_IDLE, S_HDR1, S_DRAIN: rx_ready = 1'b1;
      S_DAT_SH:                rx_ready = step_ok && need_byte;
      default:                 rx_ready = 1'b0;
    endcase
  end

  wire irq_start = EXT && HW_IRQ && irq && fresh && !rx_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      scr       <= '0;
      icr       <= '0;
      hdr0      <= '0;
      remaining <= '0;
      fresh     <= 1'b1;
      cur       <= '0;
      in_sib    <= 1'b1;
      bitpos    <= '0;
      wbyte     <= '0;
      wcnt      <= '0;
      obyte     <= '0;
      obits     <= '0;
      consumed  <= 1'b0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && tx_ready) out_valid <= 1'b0;

      unique case (state)
        S_IDLE: begin
          if (irq_start) begin
            scr            <= '0;
            icr            <= '0;
            scr[BR_IB]     <= 1'b1;
            remaining      <= '0;
            state          <= S_PREP;
          end else if (rx_valid) begin
            hdr0  <= rx_data;
            state <= S_HDR1;
          end
        end

        S_HDR1: if (rx_valid) begin
          if (!hdr0[7]) begin : control_cmd
            logic [IW-1:0] idx;
            idx = {hdr0[5:0], rx_data};
            if (fresh) begin
              scr <= '0;
              icr <= '0;
            end
            fresh <= 1'b0;
            if (idx >= IW'(1) && idx <= IW'(N)) begin
              scr[idx] <= 1'b1;
              icr[idx] <= hdr0[6];
            end
            state <= S_IDLE;
          end else begin
            remaining <= {hdr0[6:0], rx_data};
            state     <= S_PREP;
          end
        end

        S_PREP: begin
          if (EXT && scr[BR_IB] && !icr[BR_IB]) begin
            scr[BR_ID] <= 1'b1;
            icr[BR_ID] <= 1'b1;
          end
          state <= S_WAIT;
        end

        S_WAIT: begin
          if (!(EXT && scr[BR_IA] && icr[BR_IA] && stream_busy)) state <= S_CFG_CAP;
        end

        S_CFG_CAP: begin
          cur   <= IW'(N);
          state <= S_CFG_SH;
        end

        S_CFG_SH: begin
          if (cur == IW'(1)) state <= S_CFG_UPD;
          else               cur   <= cur - 1'b1;
        end

        S_CFG_UPD: state <= S_DAT_CAP;

        S_DAT_CAP: begin
          cur      <= IW'(N);
          in_sib   <= 1'b1;
          consumed <= 1'b0;
          state    <= S_DAT_SH;
        end

        S_DAT_SH: if (step_ok) begin
          // payload bits
          if (!in_sib && wr && !gen1) begin
            if (wcnt != 0) begin
              wbyte <= wbyte >> 1;
              wcnt  <= wcnt - 1'b1;
            end else if (need_byte) begin
              wbyte     <= rx_data >> 1;
              wcnt      <= 4'd7;
              remaining <= remaining - 1'b1;
              consumed  <= 1'b1;
            end
          end
          // returned bits
          if (!in_sib && !wr) begin
            if (push) begin
              out_data  <= push_byte;
              out_valid <= 1'b1;
              obyte     <= '0;
              obits     <= '0;
            end else begin
              obyte <= push_byte;
              obits <= obits + 1'b1;
            end
          end
          // walk the path
          if (in_sib && sel) begin
            in_sib <= 1'b0;
            bitpos <= '0;
            wcnt   <= '0;
            obyte  <= '0;
            obits  <= '0;
          end else if (in_sib || last_bit) begin
            if (cur == IW'(1)) state <= S_DAT_UPD;
            else begin
              cur    <= cur - 1'b1;
              in_sib <= 1'b1;
            end
          end else begin
            bitpos <= bitpos + 1'b1;
          end
        end

        S_DAT_UPD: state <= S_NEXT;

        S_NEXT: begin
          if (remaining != 0 && consumed) state <= S_WAIT;
          else if (remaining != 0)        state <= S_DRAIN;
          else begin
            fresh <= 1'b1;
            state <= S_IDLE;
          end
        end

        S_DRAIN: if (rx_valid) begin
          remaining <= remaining - 1'b1;
          if (remaining == CW'(1)) begin
            fresh <= 1'b1;
            state <= S_IDLE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // Returned bytes are held until taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));
endmodule
