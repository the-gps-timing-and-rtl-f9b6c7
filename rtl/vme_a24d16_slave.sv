// vme_a24d16_slave: A24D16 VME slave interface shared by the Clock and the
// Control card firmware. It turns VME data transfers into single-clock
// register reads and writes on the 40 MHz clock.
//
// AS* and DS0*/DS1* are synchronized with two flops; address, address
// modifier, WRITE* and data are stable while the strobes are asserted and
// are sampled directly. A cycle is accepted when AS* and a data strobe are
// low, the address modifier is an A24 one (0x39, 0x3A, 0x3D, 0x3E) and
// A[23:ADDR_BITS+1] equals the upper bits of BASE_ADDR. A write then pulses
// reg_we with reg_wdata; a read pulses reg_re and takes reg_rdata two
// clocks later (the register file registers its answer on the clock after
// reg_re), drives it on the bus and then asserts DTACK*. DTACK*
// (and the data drivers) are released when both data strobes return high.
// reg_be carries the active data strobes (DS1* = upper byte).
// Timing: DTACK* is asserted 4 clocks (write) or 6 clocks (read) after the
// data strobe falls, about 100-150 ns. The document names the A24D16 VME
// interface only; the synchronous design, the accepted address modifiers
// and the register window are this design's choices.
module vme_a24d16_slave
  import gtc_pkg::*;
#(
  parameter logic [23:0] BASE_ADDR = 24'h100000,
  parameter int          ADDR_BITS = 7        // 16-bit registers in the window
) (
  input  logic                 clk,
  input  logic                 rst,
  input  vme_in_t              vme_i,
  output vme_out_t             vme_o,
  output logic [ADDR_BITS-1:0] reg_addr,
  output logic [15:0]          reg_wdata,
  output logic [1:0]           reg_be,
  output logic                 reg_we,
  output logic                 reg_re,
  input  logic [15:0]          reg_rdata
);
  typedef enum logic [2:0] {V_IDLE, V_RWAIT, V_READ, V_ACK, V_WAIT_END} vstate_e;
  vstate_e    state;
  logic       as_s;
  logic [1:0] ds_s;
  logic       am_ok, addr_ok;

  sync2 #(.WIDTH(3), .RESET_VAL(1'b1)) u_sync (
    .clk, .rst, .d({vme_i.as_n, vme_i.ds_n}), .q({as_s, ds_s})
  );

  always_comb begin
    am_ok = (vme_i.am == AM_A24_NP_DATA) || (vme_i.am == AM_A24_NP_PROG) ||
            (vme_i.am == AM_A24_SU_DATA) || (vme_i.am == AM_A24_SU_PROG);
    addr_ok = (vme_i.addr[23:ADDR_BITS+1] == BASE_ADDR[23:ADDR_BITS+1]);
  end

  always_ff @(posedge clk) begin
    reg_we <= 1'b0;
    reg_re <= 1'b0;
    if (rst) begin
      state     <= V_IDLE;
      vme_o     <= '{data: 16'h0, data_oe: 1'b0, dtack_n: 1'b1, dtack_oe: 1'b0};
      reg_addr  <= '0;
      reg_wdata <= '0;
      reg_be    <= '0;
    end else begin
      unique case (state)
        V_IDLE: if (!as_s && ds_s != 2'b11) begin
          if (am_ok && addr_ok) begin
            reg_addr  <= vme_i.addr[ADDR_BITS:1];
            reg_be    <= ~ds_s;
            reg_wdata <= vme_i.data;
            if (!vme_i.write_n) begin
              reg_we <= 1'b1;
              state  <= V_ACK;
            end else begin
              reg_re <= 1'b1;
              state  <= V_RWAIT;
            end
          end else begin
            state <= V_WAIT_END;
          end
        end
        V_RWAIT: state <= V_READ;   // register file answers
        V_READ: begin
          vme_o.data    <= reg_rdata;
          vme_o.data_oe <= 1'b1;
          state         <= V_ACK;
        end
        V_ACK: begin
          vme_o.dtack_n  <= 1'b0;
          vme_o.dtack_oe <= 1'b1;
          if (ds_s == 2'b11 && !vme_o.dtack_n) begin
            vme_o <= '{data: 16'h0, data_oe: 1'b0, dtack_n: 1'b1, dtack_oe: 1'b0};
            state <= V_IDLE;
          end
        end
        V_WAIT_END: if (ds_s == 2'b11) state <= V_IDLE;
        default: state <= V_IDLE;
      endcase
    end
  end

  // The slave drives the data lines only during a read.
  a_oe_read_only: assert property (@(posedge clk) disable iff (rst)
    vme_o.data_oe |-> (state == V_ACK));
endmodule
