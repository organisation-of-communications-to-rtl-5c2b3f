# Auxiliary CAMAC memory bus

A CAMAC crate's standard dataway is too slow to keep up with semiconductor
RAM. This design is an auxiliary bus that connects a memory control unit in
a CAMAC crate to external bulk memory. The memory sits in "dumb" modules,
which can be CAMAC modules or any other mechanical format. The bus can
address up to 16M locations of up to 24 bits. To keep the cable down to 40
wires, address and data share the same 24 lines, one after the other:

* 24 multiplexed address/data lines, AD01–AD24;
* 11 control/status lines: C0, C1, CLEAR, OFLO ENB, OFLO, PAR ERR, INIT,
  ADSTR, ADOK, DINC, DOUTC;
* 5 ground lines.

There is no bus clock. Each operation is an interlocked handshake in two
parts. The address part uses ADSTR and ADOK; the data part uses DINC and
DOUTC. The target rate is more than 2 × 10⁶ transfers per second.

The bus protocol, the cycle types and their encoding, the signal meanings
and the connector pin-out follow the 1981 Daresbury Laboratory bus
specification, *Auxiliary CAMAC Memory Bus* (DL/CSE/TM12). That
specification describes the bus, not the logic inside the stations. So the
clocking, the state machines, the DMM arithmetic, the parity sense, the
module size and the host interface are this implementation's own choices.
They are listed in [Choices not fixed by the specification](#choices-not-fixed-by-the-specification).

## One bus operation

Every operation has the same shape, whichever of the four cycle types it is.
On the cable the signals are TTL negative logic (low voltage = 1). The RTL
and the description below use positive logic: 1 means asserted.

```
C0 C1 CLEAR  <======== cycle type, held for the whole operation ========>
OFLO ENB     <============== held for the whole operation ==============>
AD01-AD24    ------<    ADDRESS    X   DATA (WRITE, DMM)   >-------------------
                                                   <READ: module>
                   |>25ns|
ADSTR        _____________/‾‾‾‾‾‾‾‾\___________________________________________
ADOK         _________________/‾‾‾‾‾‾‾‾\_______________________________________
DINC         ________________________________/‾‾‾‾‾‾‾‾‾‾‾‾‾\___________________
DOUTC        __________________________________________/‾‾‾‾‾‾‾‾‾\_____________
```

1. The controller drives the address on AD and the cycle type on C0, C1,
   CLEAR and OFLO ENB. At least 25 ns later it raises **ADSTR**.
2. On the leading edge of ADSTR, every module latches the address and the
   control lines. The module that owns the address raises **ADOK**. The
   others stay silent.
3. When the controller sees ADOK, it removes ADSTR and takes the address
   off AD. For a WRITE or a DMM the data replaces the address at once. For
   a READ or a CLEAR, AD is left undriven. When the module sees ADSTR go,
   it removes ADOK.
4. At least 25 ns after ADOK has gone, the controller raises **DINC**.
5. The module runs its memory cycle. For a READ it drives the data on AD,
   plus PAR ERR if the word fails its parity check. For a DMM it drives OFLO
   if needed. At least 25 ns later it raises **DOUTC**.
6. On the leading edge of DOUTC the controller latches AD, PAR ERR and OFLO,
   and removes DINC. When the module sees DINC go, it removes DOUTC and
   releases AD. The operation ends when the controller sees DOUTC go.

AD is driven by the controller, except during the data part of a READ, when
the addressed module drives it. An assertion in `acmb_bus` checks that
there is never more than one driver.

If no module answers with ADOK within `TIMEOUT_NS` (2 µs), the controller
releases the bus and reports `rsp_timeout`. This happens, for example, at an
address that no module owns. INIT, a pulse of more than 1 µs, puts every
module's control logic back to idle. The controller sends INIT after reset
and whenever `init_req` is asserted. An `init_req` during an operation
abandons that operation, and no response is given for it.

A module that answered ADOK too late, after the controller had already
timed out, could otherwise wait for a DINC that belongs to the next
operation. To prevent this, a module that has given ADOK but sees a new
ADSTR instead of DINC drops its old operation and decodes the new address.

## Cycle types and what a memory module does

| C0 | C1 | CLEAR | cycle | module action |
|----|----|-------|-------|---------------|
| 0 | 0 | 0 | READ | drive the stored word; PAR ERR if its parity is wrong |
| 1 | 0 | 0 | WRITE | store the data taken from AD at DINC |
| 0 | 1 | 0 | (unused) | no ADOK, so the controller times out |
| 1 | 1 | 0 | DIRECT MEMORY MODIFY | read the word, add the modifying data, write the sum back |
| x | x | 1 | CLEAR | store zero at the addressed location |

DIRECT MEMORY MODIFY (DMM) is the operation this memory is built around. It
lets a histogramming memory, such as the store of a position-sensitive
detector, add to a bin in a single bus operation instead of a READ followed
by a WRITE. The interesting case is overflow, when the sum does not fit in
24 bits:

* **OFLO ENB set** for the operation: the location wraps round modulo
  2²⁴, and OFLO stays low.
* **OFLO ENB clear**: the location keeps its original value, and OFLO is
  raised with DOUTC so that the controller learns about it.

OFLO ENB is latched afresh on every ADSTR, so it applies to one operation
only. INIT clears it.

Each word is stored with a parity bit, using odd parity. PAR ERR is
reported on a READ, and on the read part of a DMM. A DMM on a bad word still
writes back the sum, with correct parity, and reports PAR ERR.

## Clocking and synchronisation

Each station is synchronous logic with its own clock. In `acmb_top` the
controller runs on `clk_ctrl` and module *i* runs on `clk_mem[i]`. The
clocks share a nominal period (`CLK_NS`) but need not be in phase. Every
strobe a station receives passes through a two-flop synchroniser (`acmb_sync`): ADSTR, DINC and INIT at the modules,
ADOK and DOUTC at the controller.

The address, data and control lines are not synchronised. They are read only
when a synchronised strobe says they are valid, and the protocol holds them
steady from at least 25 ns before that strobe until the other side has
answered. Each "> 25 ns" set-up is generated as `SETUP_NS/CLK_NS + 1`
clocks (3 clocks, 30 ns, at the default 10 ns clock).

With a 10 ns clock in every station, one operation takes about 32 controller
clocks. The end-to-end test measures 320 ns per back-to-back READ
(3.1 MHz), against the 500 ns the 2 MHz target allows. The shortest DOUTC
pulse it sees is 50 ns. Most of the time goes into the four handshake
round trips, each of which costs two synchroniser delays. The clock period
therefore sets the rate. At `CLK_NS = 20` the set-ups shrink to 2 clocks,
and the same count gives about 28 clocks, or 560 ns. That misses the target.
This figure is worked out, not simulated.

## The bus itself

Every line has open-collector drivers at each station and a resistive
termination at the control-unit end: 180 Ω to +5 V and 390 Ω to 0 V. A line
is therefore asserted when any station asserts it, and idle when none does.
`acmb_bus` models this as an OR over the stations, with AD taken only from
stations that enable their AD drivers. The electrical parts themselves are
not modelled: drivers with 64 mA sink, TTL levels, terminations, and the
cable (3M 3365 flat cable, at most 0.5 m, IDC connectors).

The contact numbers of the 40-way connector are constants in `acmb_pkg`:

* AD01–AD08: contacts 2–9
* AD09–AD17: contacts 11–19
* AD18–AD24: contacts 21–27
* OFLO ENB 29, DINC 30, C1 31, PAR ERR 32, C0 33, ADSTR 34, INIT 35,
  ADOK 37, DOUTC 38, OFLO 39, CLEAR 40
* 0 V: contacts 1, 10, 20, 28 and 36

## Modules

| file | what it is |
|------|-----------|
| `rtl/acmb_pkg.sv` | line widths, cycle-type enum, the driver/bus structs, encode/decode of C0 C1 CLEAR, parity, pin numbers |
| `rtl/acmb_controller.sv` | the control unit's bus master: request in, one bus operation, response out; time-out; INIT |
| `rtl/acmb_memory_module.sv` | one memory module: address decode, ADOK, READ/WRITE/CLEAR/DMM, parity, overflow, DOUTC |
| `rtl/acmb_ram.sv` | the module's RAM array: one port, registered read, 25-bit words |
| `rtl/acmb_bus.sv` | the wired-OR cable, with the one-driver assertions |
| `rtl/acmb_sync.sv` | strobe synchroniser |
| `rtl/acmb_top.sv` | one controller, `NUM_MODULES` modules and the bus, with assertions on the order of the handshake lines |

### Top-level parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_MODULES` | 4 | memory modules on the bus; module *i* answers addresses whose upper bits equal *i* |
| `MOD_ADDR_BITS` | 16 | words per module = 2^`MOD_ADDR_BITS` (64K) |
| `CLK_NS` | 10 | clock period of every station, used to turn ns into clock counts |
| `TIMEOUT_NS` | 2000 | how long the controller waits for ADOK |

With the defaults the populated space is 0x000000–0x03FFFF, which is 256K
words. Up to 2^(24−`MOD_ADDR_BITS`) modules can be addressed. With 64K-word
modules, 256 of them would fill the 16M-location space.

### Host interface of `acmb_top`

* **Request.** The host presents `req_cmd` (READ, WRITE, DMM or CLEAR),
  `req_addr`, `req_data` and `req_oflo_enb` with `req_valid`. The controller
  takes the request in a cycle where `req_ready` is also 1. It accepts one
  request at a time.
* **Response.** `rsp_valid` pulses for one clock when the operation ends.
  It comes with `rsp_data` (the read data), `rsp_par_err`, `rsp_oflo` and
  `rsp_timeout`.
* **INIT.** `init_req` starts an INIT pulse. `busy` is high during an
  operation or an INIT.
* **Test input.** While `par_inject[i]` is 1, every word module *i* stores
  gets the wrong parity bit. This is used to exercise PAR ERR.
* **Observation.** The `bus` port shows the resolved lines.

The host interface stands in for the CAMAC dataway side of the control
unit. That side is defined by the CAMAC standard and is not part of this
RTL.

## Choices not fixed by the specification

* **Clocks, synchronisers and set-up counts.** The specification defines
  only minimum set-up times (> 25 ns), the INIT length (> 1 µs) and the
  handshake order.
* **Time-out length** (2 µs). The specification asks for a time-out on ADOK
  but leaves its length open. There is no time-out on DOUTC.
* **DMM is an addition** of the modifying data to the stored word.
* **Parity sense.** Odd parity, with one parity bit per word.
* **CLEAR zeroes the addressed location.** INIT resets control state but
  does not clear the array.
* **Module size, module count and address decode**, set by the upper
  address bits.
* **The unused cycle code gets no ADOK.**
* **Abandoning operations.** `init_req` abandons an operation in
  progress. A module drops an operation when a new ADSTR comes before
  DINC.
* **The host request/response interface** and the `par_inject` test input.

## Simulating

Each testbench in `tb/` is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`, and it has a watchdog. With Verilator 5,
for example:

```
verilator --binary --timing --assert --top-module tb_acmb_top \
  rtl/acmb_pkg.sv rtl/acmb_sync.sv rtl/acmb_ram.sv rtl/acmb_bus.sv \
  rtl/acmb_controller.sv rtl/acmb_memory_module.sv rtl/acmb_top.sv \
  tb/tb_acmb_top.sv
./obj_dir/Vtb_acmb_top
```

`acmb_pkg.sv` must come first. The testbenches count one time unit as 1 ns.

| testbench | covers |
|-----------|--------|
| `tb_acmb_top` | The whole system at default size, with the controller and each module on clocks of different phase. There is a histogramming-style mix of about 1700 operations over all four modules, checked against a reference model. It measures the READ and WRITE rate (must be ≤ 500 ns per operation) and the shortest DOUTC (must be ≥ 50 ns). It also checks that each mechanism happened at least once: overflow with restore, overflow with wrap, PAR ERR on READ and on DMM, ADOK time-out, INIT. |
| `tb_acmb_controller` | The controller against a behavioural module with random response delays. It checks the cycle codes, the set-up times before ADSTR and DINC, the gap from ADOK removal to DINC, that AD is free during the data part of a READ, status hand-off, the time-out length and the INIT length, including INIT abandoning an operation. |
| `tb_acmb_memory_module` | One module against a scripted controller. It checks the address decode and the unused code, all four cycle types, both overflow cases, OFLO ENB being latched per operation, parity errors, operations abandoned after ADOK, read data set up before DOUTC, DOUTC held until DINC goes away, and INIT in the middle of an operation. |
| `tb_acmb_bus` | The wired-OR resolution against random drive patterns. |
| `tb_acmb_ram` | Array write/read-back and read latency. |

The simulator used has two-state logic, and the RAM contents are not
initialised. The tests therefore CLEAR or WRITE a location before they read
it, as software on a real system would after power-up.

## Limits

* Only the logic is modelled. Line drivers, terminations, cable delay and
  the 25 ns rise, fall and skew budgets are covered by the set-up counts,
  not simulated.
* The controller has no time-out on DOUTC. A module that fails between ADOK
  and DOUTC holds the controller until the host asserts `init_req`, or until
  reset.
* `par_inject` is a test aid with no counterpart on the real bus. Tie it to
  0 in use.
