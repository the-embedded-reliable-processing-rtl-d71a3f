// uart_rx -- receive side of a 16450-style UART, the example I/O device.
//
// Frame on `serial_in`: start bit (0), DATA_BITS data bits LSB first, one parity
// bit, one stop bit (1), each CLKS_PER_BIT FCLK cycles long. Every bit is sampled
// three times around its centre and decided by majority vote. When the stop bit
// has been sampled the word goes to RxDATA and the data-ready bit of RxSTAT is
// set; `irq` is data-ready AND the interrupt enable. Reading RxDATA (`rd` with
// `raddr` = RxDATA) clears data-ready as a side effect -- the behaviour of an
// unmodified commercial UART that makes re-executed reads lose data.
// With READ_CLEARS = 0 the device is the redesigned one: reads have no side
// effect, and the driver acknowledges the word by writing 1 to RxSTAT bit 0.
// That write travels through the write buffers like any store, so it reaches
// the device only once it can no longer be rolled back, and a re-executed
// handler reads the same word again. The acknowledge write works in both modes.
//
// Registers (word addresses from terps_pkg):
//   RxDATA  read : received word (zero-extended)
//   RxSTAT  read : bit0 data ready, bit1 overrun, bit2 parity error, bit3 framing error
//           write: bit0 = 1 acknowledges the word (clears data ready)
//   CTRL    write: bit0 receive-interrupt enable, bit7 reset the receiver and flags
//           read : bit0 interrupt enable
// Parity is even. The register map, the parity sense and the 3-sample vote are
// this design's choices; the 7-data-bit + parity frame is the one drawn for the
// UART receive operation, and the majority vote is named for the device.
module uart_rx
  import terps_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 16,
  parameter int unsigned DATA_BITS    = 7,
  parameter bit          READ_CLEARS  = 1'b1   // 1: 16450 behaviour, 0: side-effect-free read
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  serial_in,
  // register access
  input  logic  rd,
  input  word_t raddr,
  output word_t rdata,
  input  logic  we,
  input  word_t waddr,
  input  word_t wdata,
  output logic  irq,
  output logic  frame_done   // strobe: a frame has been received
);
  localparam int unsigned CW   = $clog2(CLKS_PER_BIT + 1);
  localparam int unsigned MID  = CLKS_PER_BIT / 2;
  localparam int unsigned NBIT = DATA_BITS + 3;   // start, data, parity, stop

  initial begin
    assert (CLKS_PER_BIT >= 4) else $error("uart_rx: CLKS_PER_BIT must be at least 4");
  end

  typedef enum logic {R_IDLE, R_FRAME} rstate_e;

  rstate_e                  st;
  logic [2:0]               sync;      // input synchroniser
  logic                     rx;
  logic [CW-1:0]            cnt;       // position inside the bit
  logic [$clog2(NBIT)-1:0]  bitn;      // 0 = start, then data, parity, stop
  logic [1:0]               votes;
  logic [DATA_BITS:0]       shreg;     // data bits and parity
  logic                     bit_val;
  logic [DATA_BITS-1:0]     rx_data;
  logic                     dr, oe, pe, fe, ier;
  logic                     soft_rst;

  assign rx       = sync[2];
  assign soft_rst = we && waddr == UART_CTRL && wdata[7];
  // majority of three samples: the two earlier ones are counted in votes
  assign bit_val  = (votes == 2'd2) || (votes == 2'd1 && rx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '1;
    else        sync <= {sync[1:0], serial_in};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; cnt <= '0; bitn <= '0; votes <= '0; shreg <= '0;
      rx_data <= '0; dr <= 1'b0; oe <= 1'b0; pe <= 1'b0; fe <= 1'b0; ier <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (we && waddr == UART_CTRL) ier <= wdata[0];
      if (READ_CLEARS && rd && raddr == UART_RXDATA) dr <= 1'b0;
      if (we && waddr == UART_RXSTAT && wdata[0])   dr <= 1'b0;

      if (soft_rst) begin
        st <= R_IDLE; dr <= 1'b0; oe <= 1'b0; pe <= 1'b0; fe <= 1'b0;
      end else begin
        unique case (st)
          R_IDLE: begin
            if (!rx) begin
              st <= R_FRAME; cnt <= '0; bitn <= '0; votes <= '0;
            end
          end
          R_FRAME: begin
            cnt <= cnt + 1'b1;
            if (cnt == CW'(MID - 1) || cnt == CW'(MID)) begin
              votes <= votes + {1'b0, rx};
            end else if (cnt == CW'(MID + 1)) begin
              votes <= '0;
              if (bitn == 0) begin
                if (bit_val) st <= R_IDLE;          // false start
              end else if (bitn == ($clog2(NBIT))'(NBIT - 1)) begin
                // stop bit: deliver the word
                st         <= R_IDLE;
                frame_done <= 1'b1;
                rx_data    <= shreg[DATA_BITS-1:0];
                pe         <= ^shreg;              // even parity over data + parity
                fe         <= !bit_val;
                oe         <= oe | dr;
                dr         <= 1'b1;
              end else begin
                shreg <= {bit_val, shreg[DATA_BITS:1]};
              end
            end
            if (cnt == CW'(CLKS_PER_BIT - 1)) begin
              cnt  <= '0;
              bitn <= bitn + 1'b1;
            end
          end
          default: st <= R_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    irq   = dr && ier;
    rdata = '0;
    unique case (raddr)
      UART_RXDATA: rdata = word_t'(rx_data);
      UART_RXSTAT: rdata = word_t'({fe, pe, oe, dr});
      UART_CTRL:   rdata = word_t'(ier);
      default:     rdata = '0;
    endcase
  end
endmodule
