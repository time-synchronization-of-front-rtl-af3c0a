// gtx_link_model: behavioural model of the two transceivers and the fiber
// between DHMux and Waveboard, at the level of single line bits. Not
// synthesizable; for testbenches only.
//
// The line runs at one bit per BIT_PS picoseconds (321 ps ~ 3.1104 Gb/s).
// Transmitter: tx_clk is the 20-bit word clock (155.52 MHz); the word on
// tx_sym is taken at the start of each word period and sent bit 0 first.
// Fiber: a delay of FIBER_BITS bit periods.
// Receiver: the CDR recovers the bit clock; a deserializer collects 20 bits
// per word, rx_sym changes when a word is complete and rx_clk rises 10 bits
// later. Each rxslide pulse seen on a rising edge of rx_clk makes the word
// counter skip one bit, so the word boundary and the recovered clock both
// move one bit period later, as the PMA slide mode does. A pulse on
// cdr_restart (a relock, e.g. after reattaching the fiber) restarts the word
// counter at a random bit.
module gtx_link_model #(
  parameter int BIT_PS     = 321,
  parameter int FIBER_BITS = 57
) (
  output logic        tx_clk,
  input  logic [19:0] tx_sym,
  output logic        rx_clk,
  output logic [19:0] rx_sym,
  input  logic        rxslide,
  input  logic        cdr_restart
);

  logic [19:0]  tx_sr;
  logic [255:0] fiber;
  logic [19:0]  rx_sr;
  int           tcnt, rcnt;
  logic         slide_req, restart_req;
  longint       bit_n;

  initial begin
    tx_clk = 1'b0; rx_clk = 1'b0; rx_sym = '0; tx_sr = '0; fiber = '0; rx_sr = '0;
    tcnt = 0; rcnt = $urandom % 20; slide_req = 1'b0; restart_req = 1'b0; bit_n = 0;
    forever begin
      logic b;
      #(BIT_PS * 1ps);
      bit_n++;
      // transmitter
      if (tcnt == 0) tx_sr = tx_sym;
      b = tx_sr[tcnt];
      tcnt = (tcnt + 1) % 20;
      tx_clk = (tcnt >= 10);
      // fiber
      fiber = {fiber[254:0], b};
      // receiver
      rx_sr = {fiber[FIBER_BITS], rx_sr[19:1]};
      if (restart_req) begin
        rcnt = $urandom % 20;
        restart_req = 1'b0;
      end else if (slide_req) begin
        slide_req = 1'b0;           // hold the word counter for one bit
      end else begin
        rcnt = (rcnt + 1) % 20;
        if (rcnt == 0) rx_sym = rx_sr;
      end
      rx_clk = (rcnt >= 10);
    end
  end

  always @(posedge rx_clk) if (rxslide) slide_req = 1'b1;
  always @(posedge cdr_restart) restart_req = 1'b1;

endmodule
