// vmedec: VMEbus slave interface (A32, D32, block transfer, interrupter).
//
// The module answers three kinds of cycles. Single read/write cycles (address
// modifiers 0x09, 0x0D) reach the status and control registers. Block-transfer
// reads (0x0B, 0x0F) read the external FIFOs one 32-bit word per data strobe. The
// interrupt-acknowledge cycle returns the status/ID vector when the interrupt level
// matches. Only D32 transfers (both data strobes and LWORD* low) are answered;
// other widths get no DTACK*.
// Address map, byte addresses with A[31:24] = BASE: A[23:20] = 0 selects the
// registers, index A[6:2]; A[23:20] = 1 selects the FIFOs, FIFO number A[17:16].
// In a block transfer over the registers the index steps by one per strobe.
//
// The bus strobes (AS*, DS0*, DS1*, IACK*, IACKIN*) are asynchronous to the bunch
// clock and pass a two-flop synchroniser; address, AM, WRITE* and data are stable
// while the strobes are low and are sampled directly. A state machine then decodes
// the cycle, performs it and drives DTACK* low until the master lifts its data
// strobes. A FIFO read pulses fifo_ren for one cycle and takes fifo_q the cycle after;
// an empty FIFO reads as 0. The interrupt request goes pending on a rising edge of
// irq_req and is released when acknowledged (release on acknowledge); it drives
// IRQ*[level]. An acknowledge for another level, or when nothing is pending, is
// passed on down the IACKOUT* daisy chain.
//
// Timing: DTACK* falls 4 to 6 bunch clocks after the data strobes, 2 more for a FIFO
// read. The A32:D32:BLT slave type, the three cycle types and a state machine doing
// the protocol follow the original module; the address map, the AM codes accepted,
// the release-on-acknowledge rule and all timing are this design's. Geographical
// addressing is not implemented: BASE is a parameter.
module vmedec
  import ctp_mon_pkg::*;
#(
  parameter logic [7:0]  BASE  = 8'h10,
  parameter int unsigned NCORE = N_CORE
) (
  input  logic                   clk,
  input  logic                   rst,
  // VMEbus
  input  logic                   vme_as_n,
  input  logic [1:0]             vme_ds_n,
  input  logic                   vme_write_n,
  input  logic [5:0]             vme_am,
  input  logic [31:1]            vme_addr,
  input  logic                   vme_lword_n,
  input  logic                   vme_iack_n,
  input  logic                   vme_iackin_n,
  input  logic [31:0]            vme_d_in,
  output logic [31:0]            vme_d_out,
  output logic                   vme_d_oe,
  output logic                   vme_dtack_n,
  output logic                   vme_iackout_n,
  output logic [7:1]             vme_irq_n,
  // registers
  output logic                   reg_wr,
  output logic [4:0]             reg_addr,
  output logic [31:0]            reg_wdata,
  input  logic [31:0]            reg_rdata,
  // FIFOs
  output logic [NCORE-1:0]       fifo_ren,
  input  logic [NCORE-1:0][31:0] fifo_q,
  input  logic [NCORE-1:0]       fifo_empty,
  // interrupt
  input  logic                   irq_req,
  input  logic [2:0]             irq_level,
  input  logic [7:0]             irq_vector,
  output logic                   irq_pending
);
  typedef enum logic [2:0] {
    S_IDLE, S_DECODE, S_REN, S_CAP, S_ACK, S_BLT, S_IGNORE, S_IACK_PASS
  } state_e;
  state_e state;

  // two-flop synchronisers
  logic [1:0] as_sync, iack_sync, iackin_sync;
  logic [1:0] ds_sync0, ds_sync1;
  logic       as_s, iack_s, iackin_s;
  logic [1:0] ds_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      as_sync     <= 2'b11;
      iack_sync   <= 2'b11;
      iackin_sync <= 2'b11;
      ds_sync0    <= 2'b11;
      ds_sync1    <= 2'b11;
    end else begin
      as_sync     <= {as_sync[0], vme_as_n};
      iack_sync   <= {iack_sync[0], vme_iack_n};
      iackin_sync <= {iackin_sync[0], vme_iackin_n};
      ds_sync0    <= {ds_sync0[0], vme_ds_n[0]};
      ds_sync1    <= {ds_sync1[0], vme_ds_n[1]};
    end
  end
  assign as_s     = as_sync[1];
  assign iack_s   = iack_sync[1];
  assign iackin_s = iackin_sync[1];
  assign ds_s     = {ds_sync1[1], ds_sync0[1]};

  // latched cycle
  logic [31:1] a_q;
  logic [5:0]  am_q;
  logic        write_q, lword_q, iack_q;
  logic [4:0]  idx_q;

  logic am_single, am_blt, base_hit, is_reg, is_fifo, d32;
  logic [1:0] fsel;
  assign am_single = (am_q == 6'h09) || (am_q == 6'h0D);
  assign am_blt    = (am_q == 6'h0B) || (am_q == 6'h0F);
  assign base_hit  = (a_q[31:24] == BASE);
  assign is_reg    = (a_q[23:20] == 4'h0);
  assign is_fifo   = (a_q[23:20] == 4'h1);
  assign d32       = !lword_q;
  assign fsel      = a_q[17:16];

  logic irq_req_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      a_q         <= '0;
      am_q        <= '0;
      write_q     <= 1'b1;
      lword_q     <= 1'b1;
      iack_q      <= 1'b1;
      idx_q       <= '0;
      vme_d_out   <= '0;
      vme_d_oe    <= 1'b0;
      reg_wr      <= 1'b0;
      reg_wdata   <= '0;
      irq_pending <= 1'b0;
      irq_req_q   <= 1'b0;
    end else begin
      reg_wr    <= 1'b0;
      irq_req_q <= irq_req;
      if (irq_req && !irq_req_q) irq_pending <= 1'b1;
      unique case (state)
        S_IDLE: begin
          vme_d_oe <= 1'b0;
          if (!as_s && (ds_s == 2'b00 || (!iack_s && !ds_s[0]))) begin
            a_q     <= vme_addr;
            am_q    <= vme_am;
            write_q <= vme_write_n;
            lword_q <= vme_lword_n;
            iack_q  <= iack_s;
            idx_q   <= vme_addr[6:2];
            state   <= S_DECODE;
          end
        end
        S_DECODE: begin
          if (!iack_q) begin
            if (as_s) state <= S_IDLE;
            else if (!iackin_s) begin
              if (irq_pending && a_q[3:1] == irq_level && irq_level != 3'd0) begin
                vme_d_out   <= {24'd0, irq_vector};
                vme_d_oe    <= 1'b1;
                irq_pending <= 1'b0;
                state       <= S_ACK;
              end else begin
                state <= S_IACK_PASS;
              end
            end
          end else if (!base_hit || !(am_single || am_blt) || !d32) begin
            state <= S_IGNORE;
          end else if (is_reg) begin
            if (!write_q) begin
              reg_wr    <= 1'b1;
              reg_wdata <= vme_d_in;
            end else begin
              vme_d_out <= reg_rdata;
              vme_d_oe  <= 1'b1;
            end
            state <= S_ACK;
          end else if (is_fifo && write_q && 32'(fsel) < NCORE) begin
            if (fifo_empty[fsel]) begin
              vme_d_out <= '0;
              vme_d_oe  <= 1'b1;
              state     <= S_ACK;
            end else begin
              state <= S_REN;
            end
          end else begin
            state <= S_IGNORE;
          end
        end
        S_REN: state <= S_CAP;
        S_CAP: begin
          vme_d_out <= fifo_q[fsel];
          vme_d_oe  <= 1'b1;
          state     <= S_ACK;
        end
        S_ACK: begin
          if (ds_s == 2'b11) begin
            vme_d_oe <= 1'b0;
            if (as_s)                 state <= S_IDLE;
            else if (am_blt && iack_q) state <= S_BLT;
            else                      state <= S_IGNORE;
          end
        end
        S_BLT: begin
          if (as_s) state <= S_IDLE;
          else if (ds_s == 2'b00) begin
            if (is_reg) idx_q <= idx_q + 5'd1;
            state <= S_DECODE;
          end
        end
        S_IGNORE:    if (as_s) state <= S_IDLE;
        S_IACK_PASS: if (as_s) state <= S_IDLE;
        default:     state <= S_IDLE;
      endcase
    end
  end

  assign reg_addr      = idx_q;
  assign vme_dtack_n   = (state != S_ACK);
  assign vme_iackout_n = (state != S_IACK_PASS);

  always_comb begin
    fifo_ren = '0;
    if (state == S_REN && 32'(fsel) < NCORE) fifo_ren[fsel] = 1'b1;
  end

  always_comb begin
    vme_irq_n = '1;
    if (irq_pending && irq_level != 3'd0) vme_irq_n[irq_level] = 1'b0;
  end

endmodule
