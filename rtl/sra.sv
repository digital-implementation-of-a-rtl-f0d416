// Symbol recognition algorithm (SRA).
//
// Reads, once per local subcarrier period, the subcarrier energy
// E = I^2 + Q^2 and the filtered I sub-channel value, and turns them into a
// bit stream with packet start and collision information. Two modes share
// the block:
//
// BPSK (ISO/IEC 14443 type B style). Once the Costas loop is locked the I
// value carries the subcarrier phase: its sign flips at every 180 degree
// phase change. During the pilot tone the I values are summed; the sign of
// that sum is the reference polarity and means logic 1. The first sign
// change of I after at least PILOT_MIN pilot periods starts a grid of bit
// cells, cfg.ppb periods long. Each cell's I values, multiplied by the
// reference polarity, are summed, and the sign of the sum is the bit (an
// integrate-and-dump decision). Sign changes of I re-align the grid: in the
// SOF ones anywhere, in the data only within two periods of a cell boundary.
// Start of packet: at least cfg.sof_zeros zero bits, then one or more one
// bits; the zero that follows (the start bit of the first character) raises
// 'sop' and is the first bit output. A one after two or more (but too few)
// zeros means the loop settled on the other phase during the pilot: the
// reference is inverted and the one counts as the first SOF zero. Any other
// SOF that breaks these rules sends the block back to the pilot state, with
// the pilot reference kept.
//
// Manchester (ISO/IEC 14443 type A, ISO/IEC 15693 style). E is compared with
// cfg.energy_th once at the end of each half bit, the half-bit grid being
// started by the first period in which the subcarrier is detected (taken as
// the second period of the first half, to make up for the filter delay).
// (on, off) is a 1, (off, on) a 0, (on, on) a collision and (off, off) the
// end of the packet. The first symbol must be a 1 (start of communication);
// it raises 'sop' and is not output. A collision is output as a bit with
// 'collision' set; 'pos' gives its position in the packet.
//
// 'phase_change' is high for two periods after a sign change of I and while
// the subcarrier is absent; it stops the NCP from correcting the phase.
// In BPSK a packet ends (eop) when E stays below cfg.energy_th for one bit
// time.
//
// Timing: one state update per e_valid; i_value must be valid in the same
// cycle. Outputs are registered single-cycle pulses; 'pos' is valid with
// bit_valid. The document gives what the block does (symbol recognition,
// start of packet for BPSK, collision detection for Manchester); the rules
// above are this design's choice.
module sra
  import rfid_demod_pkg::*;
#(
  parameter int unsigned EW        = 39,  // energy width
  parameter int unsigned IW        = 19,  // I value width
  parameter int unsigned PILOT_MIN = 8    // pilot periods before a phase change is accepted
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  demod_cfg_t           cfg,
  input  logic                 e_valid,
  input  logic [EW-1:0]        energy,
  input  logic signed [IW-1:0] i_value,
  output logic                 bit_valid,
  output logic                 bit_value,
  output logic                 collision,
  output logic [POS_W-1:0]     pos,
  output logic                 sop,
  output logic                 eop,
  output logic                 busy,
  output logic                 phase_change
);
  localparam int unsigned PAW = IW + 9;          // pilot sum, up to 255 periods
  localparam int unsigned CAW = IW + PPB_W + 1;  // cell sum

  typedef enum logic [2:0] {
    S_IDLE, S_PILOT, S_SOF0, S_SOF1, S_DATA, S_MAN
  } state_e;

  state_e                state;
  logic [PPB_W-1:0]      timer;        // periods into the cell / half bit
  logic [PPB_W:0]        absent_cnt;
  logic [7:0]            run_cnt;      // pilot length or SOF bit count
  logic                  ref_pos;      // reference polarity: I >= 0 means 1
  logic signed [PAW-1:0] pilot_acc;
  logic signed [CAW-1:0] cell_acc;
  logic                  i_neg_q;      // sign of the previous I value
  logic [1:0]            edge_hist;
  logic                  half;         // Manchester: 0 first half, 1 second half
  logic                  h0;           // Manchester: first half had subcarrier
  logic                  first_sym;    // Manchester: next symbol is the start symbol
  logic [POS_W-1:0]      bitpos;

  logic                  present, lost, i_neg, i_edge;
  logic                  pilot_neg, sign_flip;
  logic [PPB_W-1:0]      half_ppb, hp_m1, ppb_m1;
  logic signed [CAW-1:0] contrib, cell_next;
  logic                  close_cell, restart_cell, cell_bit;

  assign present   = (TH_W'(energy) >= cfg.energy_th);
  assign lost      = !present && ((absent_cnt + 1'b1) >= {1'b0, cfg.ppb});
  assign i_neg     = i_value[IW-1];
  assign i_edge    = (i_neg != i_neg_q);
  assign pilot_neg = pilot_acc[PAW-1];
  assign sign_flip = (i_neg != pilot_neg);
  assign half_ppb  = cfg.ppb >> 1;
  assign hp_m1     = half_ppb - PPB_W'(1);
  assign ppb_m1    = cfg.ppb - PPB_W'(1);
  assign busy      = (state != S_IDLE);
  assign phase_change = (|edge_hist) || (absent_cnt != '0);

  // BPSK cell bookkeeping
  always_comb begin
    contrib   = ref_pos ? CAW'(i_value) : -CAW'(i_value);
    cell_next = cell_acc + contrib;
    close_cell   = 1'b0;
    restart_cell = 1'b0;
    if (i_edge && state == S_SOF1) begin
      if (timer >= half_ppb) close_cell   = 1'b1;   // boundary is now: cell ends early
      else                   restart_cell = 1'b1;   // boundary was late: shift the grid
    end else if (i_edge && state == S_DATA && timer >= ppb_m1 - PPB_W'(1)) begin
      close_cell = 1'b1;
    end else if (i_edge && state == S_DATA && timer <= PPB_W'(2) && timer != '0) begin
      restart_cell = 1'b1;
    end
    // at an early close the edge value belongs to the next cell
    cell_bit = close_cell ? (cell_acc > 0) : (cell_next > 0);
    if (!close_cell && !restart_cell && timer >= ppb_m1) close_cell = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      timer      <= '0;
      absent_cnt <= '0;
      run_cnt    <= '0;
      ref_pos    <= 1'b1;
      pilot_acc  <= '0;
      cell_acc   <= '0;
      i_neg_q    <= 1'b0;
      edge_hist  <= '0;
      half       <= 1'b0;
      h0         <= 1'b0;
      first_sym  <= 1'b1;
      bitpos     <= '0;
      bit_valid  <= 1'b0;
      bit_value  <= 1'b0;
      collision  <= 1'b0;
      pos        <= '0;
      sop        <= 1'b0;
      eop        <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      collision <= 1'b0;
      sop       <= 1'b0;
      eop       <= 1'b0;
      if (e_valid) begin
        i_neg_q    <= i_neg;
        edge_hist  <= {edge_hist[0], i_edge && cfg.coding == CODE_BPSK};
        absent_cnt <= present ? '0 : absent_cnt + 1'b1;

        // BPSK cell timer and sum
        if (state inside {S_SOF0, S_SOF1, S_DATA}) begin
          if (restart_cell || (close_cell && i_edge)) begin
            timer    <= PPB_W'(1);
            cell_acc <= contrib;
          end else if (close_cell) begin
            timer    <= '0;
            cell_acc <= '0;
          end else begin
            timer    <= timer + 1'b1;
            cell_acc <= cell_next;
          end
        end

        unique case (state)
          S_IDLE: begin
            run_cnt   <= '0;
            pilot_acc <= '0;
            half      <= 1'b0;
            first_sym <= 1'b1;
            bitpos    <= '0;
            if (present) begin
              if (cfg.coding == CODE_BPSK) begin
                run_cnt   <= 8'd1;
                pilot_acc <= PAW'(i_value);
                state     <= S_PILOT;
              end else begin
                // the filters delay the detected onset by about one period:
                // the onset value counts as the second period of the half
                timer <= PPB_W'(2);
                state <= S_MAN;
              end
            end
          end

          S_PILOT: begin
            if (run_cnt >= 8'(PILOT_MIN) && sign_flip) begin
              // first phase change: start of the SOF zeros
              ref_pos  <= !pilot_neg;
              timer    <= PPB_W'(1);
              cell_acc <= pilot_neg ? -CAW'(i_value) : CAW'(i_value);
              run_cnt  <= '0;
              state    <= S_SOF0;
            end else if (run_cnt != 8'hff) begin
              run_cnt   <= run_cnt + 1'b1;
              pilot_acc <= pilot_acc + PAW'(i_value);
            end
          end

          S_SOF0: begin
            if (close_cell) begin
              if (!cell_bit) begin
                if (run_cnt != 8'hff) run_cnt <= run_cnt + 1'b1;
              end else if (run_cnt >= 8'(cfg.sof_zeros)) begin
                run_cnt <= 8'd1;
                state   <= S_SOF1;
              end else if (run_cnt >= 8'd2) begin
                // the "zeros" were the pilot in its final phase (the loop
                // settled 180 degrees away from the early pilot sum): take
                // that phase as the reference; this cell is the first zero
                ref_pos   <= !ref_pos;
                pilot_acc <= -pilot_acc;
                run_cnt   <= 8'd1;
              end else begin
                run_cnt <= 8'hff;          // keep the pilot reference
                state   <= S_PILOT;
              end
            end
          end

          S_SOF1: begin
            if (close_cell) begin
              if (cell_bit) begin
                if (run_cnt != 8'hff) run_cnt <= run_cnt + 1'b1;
              end else if (run_cnt >= 8'd1) begin
                sop       <= 1'b1;
                bit_valid <= 1'b1;
                bit_value <= 1'b0;
                pos       <= '0;
                bitpos    <= POS_W'(1);
                state     <= S_DATA;
              end else begin
                run_cnt <= 8'hff;
                state   <= S_PILOT;
              end
            end
          end

          S_DATA: begin
            if (close_cell && absent_cnt < {1'b0, half_ppb}) begin
              bit_valid <= 1'b1;
              bit_value <= cell_bit;
              pos       <= bitpos;
              bitpos    <= bitpos + 1'b1;
            end
          end

          S_MAN: begin
            if (timer >= hp_m1) timer <= '0;
            else                timer <= timer + 1'b1;
            if (timer >= hp_m1) begin
              half <= ~half;
              if (!half) begin
                h0 <= present;
              end else begin
                first_sym <= 1'b0;
                if (first_sym) begin
                  if (h0 && !present) sop <= 1'b1;
                  else                state <= S_IDLE;
                end else if (!h0 && !present) begin
                  eop   <= 1'b1;
                  state <= S_IDLE;
                end else begin
                  bit_valid <= 1'b1;
                  bit_value <= h0;
                  collision <= h0 && present;
                  pos       <= bitpos;
                  bitpos    <= bitpos + 1'b1;
                end
              end
            end
          end

          default: state <= S_IDLE;
        endcase

        if (state inside {S_PILOT, S_SOF0, S_SOF1, S_DATA} && lost) begin
          if (state == S_DATA) eop <= 1'b1;
          state <= S_IDLE;
        end
      end
    end
  end
endmodule
