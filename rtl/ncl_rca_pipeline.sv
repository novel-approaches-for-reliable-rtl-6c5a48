// ncl_rca_pipeline: the NCL system framework applied to the 4-bit ripple-carry adder:
//
//   a, b, ci --> [input DI register] --> RCA (combinational NCL) --> [output DI register] --> s, co
//        ko <--  completion(input reg)       ki_in_reg <-- completion(output reg)   <-- ki
//
// The environment offers DATA when ko = 1 and NULL when ko = 0. The output register
// passes a wavefront when the receiver's ki asks for it (1 = DATA, 0 = NULL). Completion
// detection on each register tells the stage before it which wavefront to send next, so
// DATA and NULL wavefronts alternate without a clock. The same logical framework serves
// the design's HYBRID variant (registers in static CMOS, logic and completion detection
// in GDI) and its GNCL variant, which differ only at transistor level.
//
// The handshake forms a ring through gates (register -> completion -> previous register),
// so lint and synthesis tools report a combinational loop here; that loop is the
// asynchronous control itself and stands by design. Every gate in it holds state, and each
// transition waits for the one before it, so the ring never oscillates.
//
// Asynchronous, no clock; rst forces everything to NULL (hold it while inputs are NULL
// and ki = 1; after release ko rises to request the first DATA).
module ncl_rca_pipeline #(
  parameter int unsigned WIDTH = 4
) (
  input  logic                  rst,
  input  logic [WIDTH-1:0][1:0] a,
  input  logic [WIDTH-1:0][1:0] b,
  input  logic [1:0]            ci,
  output logic                  ko,
  input  logic                  ki,
  output logic [WIDTH-1:0][1:0] s,
  output logic [1:0]            co
);

  localparam int unsigned IW = 2*WIDTH + 1;   // a, b, ci
  localparam int unsigned OW = WIDTH + 1;     // s, co

  logic [IW-1:0][1:0] in_d, in_q;
  logic [IW-1:0]      in_ko;
  logic [OW-1:0][1:0] out_d, out_q;
  logic [OW-1:0]      out_ko;
  logic               in_ki;

  assign in_d = {ci, b, a};

  ncl_di_register #(.WIDTH(IW)) u_rin (.rst, .ki(in_ki), .d(in_d), .q(in_q), .ko(in_ko));
  ncl_completion  #(.WIDTH(IW)) u_cin (.rst, .ko(in_ko), .kout(ko));

  logic [WIDTH-1:0][1:0] sum;
  logic [1:0]            cout;
  ncl_rca #(.WIDTH(WIDTH)) u_rca (
    .rst, .a(in_q[WIDTH-1:0]), .b(in_q[2*WIDTH-1:WIDTH]), .ci(in_q[2*WIDTH]), .s(sum), .co(cout)
  );

  assign out_d = {cout, sum};

  ncl_di_register #(.WIDTH(OW)) u_rout (.rst, .ki, .d(out_d), .q(out_q), .ko(out_ko));
  ncl_completion  #(.WIDTH(OW)) u_cout (.rst, .ko(out_ko), .kout(in_ki));

  assign s  = out_q[WIDTH-1:0];
  assign co = out_q[WIDTH];

endmodule
